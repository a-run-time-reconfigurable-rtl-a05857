// tb_mbap_texture_filter: the two-bilinear texture filter with a model of the
// two address generators and caches. Random back-to-back operations: pairs of
// bilinear pixels, single bilinear pixels in either slot, trilinear and n:1
// anisotropic pixels in either slot. Checks the filtered values, that last
// comes after exactly 1 (Bi, Tri) or n (n:1 Ani) cycles, and that the two
// bilinear filters alternate mip levels from cycle to cycle.
module tb_mbap_texture_filter;
  import tex_pkg::*;
  import fp16_ref_pkg::*;

  logic        clk = 0, rst_n = 0, valid = 0;
  logic [1:0]  pf = 0, ar = 0;
  ft_e         ft = FT_BI;
  logic [15:0] tex0 [4], tex1 [4];
  logic [15:0] xf0, yf0, xf1, yf1, lf, r0, r1;
  logic [3:0]  iter;
  logic        first, last, lod_par;
  logic [15:0] pixa = 0, pixb = 0;   // pixel of slot 0 / slot 1
  int          checks = 0, failures = 0, cycles = 0, par_seen [2];

  mbap_texture_filter dut (.clk, .rst_n, .valid, .pf, .ft, .ar, .tex0, .xf0, .yf0,
                           .tex1, .xf1, .yf1, .lf, .r0, .r1, .iter, .first, .last, .lod_par);

  always #5 clk = ~clk;

  // address generators + caches: what AG0/AG1 would fetch this cycle
  always_comb begin
    logic [15:0] p0, p1;
    logic        l0, l1;
    p0 = pf[0] ? pixa : pixb;
    p1 = pf[1] ? pixb : pixa;
    l0 = (ft == FT_BI) ? 1'b0 : lod_par;
    l1 = (ft == FT_BI) ? 1'b0 : ~lod_par;
    for (int k = 0; k < 4; k++) begin
      tex0[k] = tm_texel(p0, l0, iter, k);
      tex1[k] = tm_texel(p1, l1, iter, k);
    end
    xf0 = tm_frac(p0, l0, iter, 0); yf0 = tm_frac(p0, l0, iter, 1);
    xf1 = tm_frac(p1, l1, iter, 0); yf1 = tm_frac(p1, l1, iter, 1);
    lf  = tm_lf(p0);
  end

  task automatic expect_eq(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, exp_n;
    logic [1:0] f;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 600; op++) begin
      f = 2'($urandom % 3);
      ft = ft_e'(f);
      ar = 2'($urandom);
      pixa = 16'($urandom); pixb = 16'($urandom);
      pf = (f == 2'd0) ? 2'($urandom % 3 + 1) : (($urandom % 2) ? 2'b01 : 2'b10);
      exp_n = (f == 2'd2) ? (2 << ar) : 1;
      valid = 1;
      n = 0;
      #1;
      forever begin
        n++;
        par_seen[lod_par]++;
        if (last || n > 20) break;
        @(posedge clk); #2;
      end
      @(posedge clk); #1;
      cycles += n;
      expect_eq(n, exp_n, "iterations");
      if (f == 2'd0) begin
        if (pf[0]) expect_eq(r0, tm_expect(2'd0, pixa, ar), "Bi slot 0");
        if (pf[1]) expect_eq(r1, tm_expect(2'd0, pixb, ar), "Bi slot 1");
      end else begin
        expect_eq(pf[0] ? r0 : r1, tm_expect(f, pf[0] ? pixa : pixb, ar), f == 1 ? "Tri" : "Ani");
      end
    end
    valid = 0;
    checks++;
    if (par_seen[0] == 0 || par_seen[1] == 0) begin
      failures++;
      $display("FAIL level order never alternated");
    end
    $display("filtered for %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
