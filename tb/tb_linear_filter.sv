// tb_linear_filter: checks Li = T1 + (T0 - T1) x FC against the reference
// formula, including the end points FC = 0 (gives T1) and FC = 1 (gives T0).
module tb_linear_filter;
  import fp16_ref_pkg::*;

  logic [15:0] t0, t1, fc, y;
  int          checks = 0, failures = 0;

  linear_filter dut (.t0, .t1, .fc, .y);

  task automatic check(logic [15:0] exp_y);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL t0=%h t1=%h fc=%h: got %h expected %h", t0, t1, fc, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t0 = 16'h3C00; t1 = 16'h0000; fc = 16'h3800; check(16'h3800);   // 0.5 between 0 and 1
    t0 = 16'h3400; t1 = 16'h3A00; fc = 16'h0000; check(16'h3A00);   // FC = 0 -> T1
    t0 = 16'h3400; t1 = 16'h3A00; fc = 16'h3C00; check(16'h3400);   // FC = 1 -> T0
    t0 = 16'h4000; t1 = 16'h3C00; fc = 16'h3400; check(16'h3D00);   // 1 + 1 * 0.25
    for (int i = 0; i < 30000; i++) begin
      t0 = rnd_unit(); t1 = rnd_unit(); fc = rnd_unit();
      if (fc[15]) fc[15] = 1'b0;
      check(r_lin(t0, t1, fc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
