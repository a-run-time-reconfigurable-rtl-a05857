// tb_aniso_logic: checks the anisotropic divide by n = 2, 4, 8, 16 against
// real division, including zero and results that underflow to zero.
module tb_aniso_logic;
  import fp16_ref_pkg::*;

  logic [15:0] x, y;
  logic [1:0]  ar;
  int          checks = 0, failures = 0;

  aniso_logic dut (.x, .ar, .y);

  task automatic check();
    logic [15:0] exp_y;
    #1;
    exp_y = r_al(x, ar);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h ar=%0d: got %h expected %h", x, ar, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      ar = 2'(a);
      x = 16'h3C00; check();
      x = 16'h0000; check();
      x = 16'h0400; check();   // smallest normal: underflows
      x = 16'h0800; check();
    end
    for (int i = 0; i < 20000; i++) begin
      x  = rnd_fp(0, 30);
      ar = 2'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
