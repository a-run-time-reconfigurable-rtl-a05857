// tb_bilinear_filter: checks the three-linear-filter bilinear against the
// reference formula and against the corner cases of the weights: with
// XF = YF = 1 the result is T0, with XF = 1, YF = 0 it is T1, with XF = 0,
// YF = 1 it is T2 and with XF = YF = 0 it is T3.
module tb_bilinear_filter;
  import fp16_ref_pkg::*;

  logic [15:0] t [4];
  logic [15:0] xf, yf, y;
  int          checks = 0, failures = 0;

  bilinear_filter dut (.t, .xf, .yf, .y);

  task automatic check(logic [15:0] exp_y);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL t=%h %h %h %h xf=%h yf=%h: got %h expected %h",
                                  t[0], t[1], t[2], t[3], xf, yf, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t[0] = 16'h3000; t[1] = 16'h3400; t[2] = 16'h3800; t[3] = 16'h3A00;
    xf = 16'h3C00; yf = 16'h3C00; check(t[0]);
    xf = 16'h3C00; yf = 16'h0000; check(t[1]);
    xf = 16'h0000; yf = 16'h3C00; check(t[2]);
    xf = 16'h0000; yf = 16'h0000; check(t[3]);
    // equal weights: average of 0.125, 0.25, 0.5, 0.75 = 0.40625
    xf = 16'h3800; yf = 16'h3800; check(16'h3680);
    for (int i = 0; i < 20000; i++) begin
      foreach (t[k]) t[k] = rnd_unit();
      xf = rnd_unit(); xf[15] = 1'b0;
      yf = rnd_unit(); yf[15] = 1'b0;
      check(r_bil(t[0], t[1], t[2], t[3], xf, yf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
