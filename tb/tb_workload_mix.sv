// tb_workload_mix: runs the five filtering configurations of the unit's
// evaluation -- mixed bilinear and trilinear, and mixed bilinear and n:1
// anisotropic for n = 2, 4, 8, 16 -- as synthetic streams through the
// two-bilinear texture unit, and reports the utilization statistics.
//
// Each sub unit gets a stream made of runs of one filter type. The bilinear
// share is about 6% in the trilinear mix and 11% in the anisotropic mixes;
// run lengths are random up to 200. Sub unit 1 gets a quarter fewer pixels
// than sub unit 0 and each producer pauses now and then, so the FIFOs
// sometimes run empty. Every result is checked against the
// reference filters. Per configuration the testbench counts the issue cycles
// and the fetch cases that leave a bilinear filter idle: a bilinear pixel
// alone because the other FIFO is empty, or alone because the other pixel is
// trilinear/anisotropic. It also counts the cases where a lone
// trilinear/anisotropic pixel is served while the other FIFO is empty (the
// gain from sharing). It then checks the bookkeeping identity
//   2 x issue cycles - idle bilinear slots = bilinear work
// where the work is 1 per bilinear, 2 per trilinear and 2n per n:1 pixel.
module tb_workload_mix;
  import tex_pkg::*;
  import fp16_ref_pkg::*;

  localparam int PIXELS = 1200;   // per sub unit and configuration

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

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      tex0[k] = tm_texel(ag_pix[0], ag_lod[0], ag_iter, k);
      tex1[k] = tm_texel(ag_pix[1], ag_lod[1], ag_iter, k);
    end
    xf0 = tm_frac(ag_pix[0], ag_lod[0], ag_iter, 0); yf0 = tm_frac(ag_pix[0], ag_lod[0], ag_iter, 1);
    xf1 = tm_frac(ag_pix[1], ag_lod[1], ag_iter, 0); yf1 = tm_frac(ag_pix[1], ag_lod[1], ag_iter, 1);
    lf  = tm_lf(ag_pix[0]);
  end

  typedef struct { logic [1:0] ft; logic [15:0] pix; } px_t;
  px_t todo [2][$];
  px_t inflight [2][$];
  int  checks = 0, failures = 0;
  int  issue_cycles, loss_empty, loss_share, gain_share, total_cycles, counting = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each producer pauses now and then (one time in five, in 64-cycle slots)
  logic [1:0] pause = 0;
  int unsigned slot_cnt = 0;
  always @(posedge clk) begin
    slot_cnt <= slot_cnt + 1;
    if (slot_cnt % 64 == 0) pause <= {2{1'b0}} | {1'(($urandom % 5) == 0), 1'(($urandom % 5) == 0)};
  end

  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) begin
      in_push[i] = 1'b0;
      if (rst_n && todo[i].size() > 0 && !in_full[i] && !pause[i]) begin
        in_push[i] = 1'b1;
        in_ft[i]   = ft_e'(todo[i][0].ft);
        in_pix[i]  = todo[i][0].pix;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    ft_e a, b;
    for (int i = 0; i < 2; i++) if (in_push[i]) inflight[i].push_back(todo[i].pop_front());
    for (int i = 0; i < 2; i++) if (out_wen[i]) begin
      px_t p;
      checks++;
      if (inflight[i].size() == 0) fail("unexpected output");
      else begin
        p = inflight[i].pop_front();
        if (out_data[i] !== tm_expect(p.ft, p.pix, ar))
          fail($sformatf("sub unit %0d ft=%0d pix=%h: got %h", i, p.ft, p.pix, out_data[i]));
      end
    end
    if (counting) begin
      total_cycles++;
      a = ft_e'(dut.fts0);
      b = ft_e'(dut.fts1);
      if (dut.valid) issue_cycles++;
      if (dut.valid && dut.first) begin
        if ((a == FT_BI && b == FT_NONE) || (a == FT_NONE && b == FT_BI)) loss_empty++;
        if (a == FT_BI && (b == FT_TRI || b == FT_ANI))                   loss_share++;
        if ((a == FT_TRI || a == FT_ANI) && b == FT_NONE)                 gain_share++;
        if (a == FT_NONE && (b == FT_TRI || b == FT_ANI))                 gain_share++;
      end
    end
  end

  task automatic run_config(logic [1:0] other, logic [1:0] ratio, int bi_pct, string name);
    longint work = 0;
    int n = 2 << ratio;
    ar = ratio;
    issue_cycles = 0; loss_empty = 0; loss_share = 0; gain_share = 0; total_cycles = 0;
    for (int i = 0; i < 2; i++) begin
      int k = 0;
      int len = (i == 0) ? PIXELS : PIXELS * 3 / 4;   // lists of unequal size
      while (k < len) begin
        int run = 1 + $urandom % 200;
        logic [1:0] f = (($urandom % 100) < bi_pct) ? 2'd0 : other;
        for (int r = 0; r < run && k < len; r++, k++) begin
          todo[i].push_back('{f, 16'($urandom)});
          work += (f == 2'd0) ? 1 : (f == 2'd1) ? 2 : 2 * n;
        end
      end
    end
    @(negedge clk);
    counting = 1;
    while (todo[0].size() + todo[1].size() + inflight[0].size() + inflight[1].size() != 0) @(posedge clk);
    counting = 0;
    repeat (2) @(posedge clk);
    $display("%-22s cycles %7d  issue %7d  loss(empty) %5d  gain(shared) %5d  loss(shared) %5d  bilinear work %0d",
             name, total_cycles, issue_cycles, loss_empty, gain_share, loss_share, work);
    checks++;
    if (longint'(2 * issue_cycles - loss_empty - loss_share) != work)
      fail($sformatf("%s: bilinear slots %0d do not match work %0d", name,
                     2 * issue_cycles - loss_empty - loss_share, work));
    checks++;
    if (gain_share == 0) fail($sformatf("%s: no shared-filter gain seen", name));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_config(2'd1, 2'd0, 6,  "Mixed Bi and Tri");
    run_config(2'd2, 2'd0, 11, "Mixed Bi and 2:1 Ani");
    run_config(2'd2, 2'd1, 11, "Mixed Bi and 4:1 Ani");
    run_config(2'd2, 2'd2, 11, "Mixed Bi and 8:1 Ani");
    run_config(2'd2, 2'd3, 11, "Mixed Bi and 16:1 Ani");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
