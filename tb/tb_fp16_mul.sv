// tb_fp16_mul: checks the 16-bit floating-point multiplier against exactly
// rounded reference products: random operands, unit-interval operands as in
// the filters, zeros, overflow and underflow.
module tb_fp16_mul;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  int          checks = 0, failures = 0;

  fp16_mul dut (.a, .b, .y);

  task automatic check();
    logic [15:0] exp_y;
    #1;
    exp_y = r_mul(a, b);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", a, b, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'h3C00; b = 16'h3C00; check();
    a = 16'h0000; b = 16'h3C00; check();
    a = 16'h7BFF; b = 16'h4000; check();   // overflow
    a = 16'h0400; b = 16'h3800; check();   // underflow
    a = 16'h3E00; b = 16'hBE00; check();
    for (int i = 0; i < 40000; i++) begin
      a = rnd_fp(1, 30);
      b = rnd_fp(1, 30);
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = rnd_unit();
      b = rnd_unit();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
