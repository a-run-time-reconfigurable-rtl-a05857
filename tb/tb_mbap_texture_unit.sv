// tb_mbap_texture_unit: end-to-end test of the two-bilinear all-purpose
// texture unit at its default size, with a model of the two address
// generators and texture caches.
//
// Two producers feed the sub texture unit inputs; a scoreboard per sub unit
// checks every output value (against the reference filters) and its order.
// Phases:
//   1. bilinear only, both inputs at full rate: two pixels per cycle;
//   2. trilinear only: one pixel per cycle, served alternately (round robin);
//   3. n:1 anisotropic only, n = 2, 4, 8, 16: one pixel every n cycles;
//   4. "mixed bilinear and trilinear" and "mixed bilinear and n:1 anisotropic"
//      streams with runs of one filter type, gaps and bursts.
// Every fetch case of the fetch table (0..7), both priority orders, the held
// decision of a multi-cycle anisotropic pixel, a full input FIFO and both
// mip-level orders must each occur at least once.
module tb_mbap_texture_unit;
  import tex_pkg::*;
  import fp16_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [1:0]  in_push = 0, in_full, ar = 0;
  ft_e         in_ft [2];
  logic [15:0] in_pix [2];
  logic [1:0]  ag_valid, ag_lod, out_wen;
  logic [15:0] ag_pix [2];
  logic [3:0]  ag_iter;
  logic [15:0] tex0 [4], tex1 [4], out_data [2];
  logic [15:0] xf0, yf0, xf1, yf1, lf;

  mbap_texture_unit dut (
    .clk, .rst_n, .in_push, .in_ft, .in_pix, .in_full, .ar,
    .ag_valid, .ag_pix, .ag_lod, .ag_iter,
    .tex0, .xf0, .yf0, .tex1, .xf1, .yf1, .lf,
    .out_data, .out_wen
  );

  always #5 clk = ~clk;

  // address generators + texture caches (no misses: data in the same cycle)
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      tex0[k] = tm_texel(ag_pix[0], ag_lod[0], ag_iter, k);
      tex1[k] = tm_texel(ag_pix[1], ag_lod[1], ag_iter, k);
    end
    xf0 = tm_frac(ag_pix[0], ag_lod[0], ag_iter, 0); yf0 = tm_frac(ag_pix[0], ag_lod[0], ag_iter, 1);
    xf1 = tm_frac(ag_pix[1], ag_lod[1], ag_iter, 0); yf1 = tm_frac(ag_pix[1], ag_lod[1], ag_iter, 1);
    lf  = tm_lf(ag_pix[0]);
  end

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  typedef struct { logic [1:0] ft; logic [15:0] pix; } px_t;
  px_t todo [2][$];     // still to push
  px_t inflight [2][$]; // pushed, result not yet seen
  int  served [2];
  int  case_cnt [8], swap_cnt [2], hold_cnt = 0, full_cnt = 0, lod_cnt [2];
  int  push_pct = 100;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producers
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) begin
      in_push[i] = 1'b0;
      if (rst_n && todo[i].size() > 0 && !in_full[i] && ($urandom % 100) < push_pct) begin
        in_push[i] = 1'b1;
        in_ft[i]   = ft_e'(todo[i][0].ft);
        in_pix[i]  = todo[i][0].pix;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (in_push[i]) begin
      inflight[i].push_back(todo[i].pop_front());
    end
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) if (out_wen[i]) begin
      px_t p;
      logic [15:0] e;
      checks++;
      if (inflight[i].size() == 0) begin
        fail($sformatf("unexpected output on sub unit %0d", i));
      end else begin
        p = inflight[i].pop_front();
        e = tm_expect(p.ft, p.pix, ar);
        served[i]++;
        if (out_data[i] !== e)
          fail($sformatf("sub unit %0d ft=%0d pix=%h: got %h expected %h", i, p.ft, p.pix, out_data[i], e));
      end
    end
  end

  // mechanism coverage
  always @(posedge clk) if (rst_n) begin
    ft_e a, b;
    a = ft_e'(dut.fts0);
    b = ft_e'(dut.fts1);
    if (dut.valid && dut.first) begin
      if      (a == FT_BI && b == FT_BI)                     case_cnt[0]++;
      else if (a == FT_TRI && b != FT_NONE)                  case_cnt[1]++;
      else if (a == FT_ANI && b != FT_NONE)                  case_cnt[2]++;
      else if (a == FT_BI && b == FT_NONE)                   case_cnt[3]++;
      else if (a == FT_NONE && b == FT_BI)                   case_cnt[4]++;
      else if (a != FT_BI && a != FT_NONE && b == FT_NONE)   case_cnt[5]++;
      else if (a == FT_NONE)                                 case_cnt[6]++;
      else                                                   case_cnt[7]++;
      if (a != FT_NONE && b != FT_NONE) swap_cnt[dut.swap]++;
    end
    if (dut.valid && !dut.first) hold_cnt++;
    if (|in_full) full_cnt++;
    if (dut.valid && ft_e'(dut.op_ft) != FT_BI) lod_cnt[ag_lod[0]]++;
  end

  task automatic wait_drained();
    int guard = 0;
    while ((todo[0].size() + todo[1].size() + inflight[0].size() + inflight[1].size()) != 0 && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  function automatic logic [15:0] fresh_pix();
    return 16'($urandom);
  endfunction

  // push n pixels of type ft to both streams, run at full rate, return cycles
  task automatic uniform_phase(logic [1:0] ft, int n, int exp_cycles, string name);
    int unsigned t0, t1;
    int d, dmax = 0;
    push_pct = 100;
    served[0] = 0; served[1] = 0;
    for (int k = 0; k < n; k++)
      for (int i = 0; i < 2; i++) todo[i].push_back('{ft, fresh_pix()});
    t0 = cyc;
    while (served[0] + served[1] < 2 * n) begin
      @(posedge clk); #1;
      d = served[0] - served[1];
      if (d < 0) d = -d;
      if (d > dmax) dmax = d;
    end
    t1 = cyc;
    $display("%s: %0d pixels in %0d cycles (limit %0d)", name, 2 * n, t1 - t0, exp_cycles);
    checks++;
    if (int'(t1 - t0) > exp_cycles) fail($sformatf("%s too slow: %0d cycles", name, t1 - t0));
    checks++;
    if (dmax > 2) fail($sformatf("%s unfair: sub units %0d apart", name, dmax));
    wait_drained();
  endtask

  // mixed stream: runs of one type with interleaving, gaps in the input
  task automatic mixed_phase(logic [1:0] other, int n);
    push_pct = 40;
    for (int i = 0; i < 2; i++) begin
      int k = 0;
      while (k < n) begin
        int run = 1 + $urandom % 12;
        logic [1:0] f = ($urandom % 4 == 0) ? 2'd0 : other;
        for (int r = 0; r < run && k < n; r++, k++) todo[i].push_back('{f, fresh_pix()});
      end
    end
    wait_drained();
    // burst: fill the FIFOs faster than they drain
    push_pct = 100;
    for (int k = 0; k < 40; k++)
      for (int i = 0; i < 2; i++) todo[i].push_back('{($urandom % 2) ? 2'd0 : other, fresh_pix()});
    wait_drained();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    ar = 2'd0;
    uniform_phase(2'd0, 64, 64 + 6, "bilinear only");
    uniform_phase(2'd1, 64, 128 + 6, "trilinear only");
    for (int a = 0; a < 4; a++) begin
      ar = 2'(a);
      uniform_phase(2'd2, 8, 16 * (2 << a) + 6, $sformatf("%0d:1 anisotropic only", 2 << a));
    end
    ar = 2'd0;
    mixed_phase(2'd1, 150);
    for (int a = 0; a < 4; a++) begin
      ar = 2'(a);
      mixed_phase(2'd2, 40);
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      $display("fetch case %0d: %0d", c, case_cnt[c]);
      if (case_cnt[c] == 0) fail($sformatf("fetch case %0d never happened", c));
    end
    $display("priority order 0/1: %0d/%0d, held anisotropic cycles: %0d, full-FIFO cycles: %0d, level order 0/1: %0d/%0d",
             swap_cnt[0], swap_cnt[1], hold_cnt, full_cnt, lod_cnt[0], lod_cnt[1]);
    checks++; if (swap_cnt[0] == 0 || swap_cnt[1] == 0) fail("a priority order never used");
    checks++; if (hold_cnt == 0) fail("no held anisotropic cycle");
    checks++; if (full_cnt == 0) fail("no full FIFO");
    checks++; if (lod_cnt[0] == 0 || lod_cnt[1] == 0) fail("a mip-level order never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
