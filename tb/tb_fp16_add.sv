// tb_fp16_add: checks the 16-bit floating-point adder/subtracter against
// exactly rounded reference sums: random operands over the whole exponent
// range, operands of close magnitude (cancellation), ties, overflow, zeros.
module tb_fp16_add;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  logic        sub;
  int          checks = 0, failures = 0;

  fp16_add dut (.a, .b, .sub, .y);

  task automatic check();
    logic [15:0] exp_y;
    #1;
    exp_y = sub ? r_sub(a, b) : r_add(a, b);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h: got %h expected %h", a, sub ? "-" : "+", b, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed
    a = 16'h3C00; b = 16'h3C00; sub = 0; check();   // 1 + 1
    a = 16'h3C00; b = 16'h3C00; sub = 1; check();   // 1 - 1 = 0
    a = 16'h3C00; b = 16'h0000; sub = 0; check();
    a = 16'h0000; b = 16'h0000; sub = 1; check();
    a = 16'h7BFF; b = 16'h7BFF; sub = 0; check();   // overflow
    a = 16'h3C00; b = 16'h1000; sub = 0; check();   // tiny addend
    a = 16'h3C01; b = 16'h3C00; sub = 1; check();   // cancellation
    a = 16'h0400; b = 16'h0401; sub = 1; check();   // underflow to zero
    a = 16'h3C00; b = 16'h1400; sub = 0; check();   // a tie
    for (int i = 0; i < 30000; i++) begin
      a   = rnd_fp(1, 30);
      b   = rnd_fp(1, 30);
      sub = 1'($urandom);
      check();
    end
    for (int i = 0; i < 30000; i++) begin
      a   = rnd_fp(1, 30);
      b   = {1'($urandom), 5'(int'(a[14:10]) - 2 + ($urandom % 5)), 10'($urandom)};
      if (b[14:10] == 5'd0 || b[14:10] == 5'd31) b[14:10] = a[14:10];
      sub = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
