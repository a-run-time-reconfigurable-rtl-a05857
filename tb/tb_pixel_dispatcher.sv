// tb_pixel_dispatcher: for each fetch pattern (both, only slot 0, only
// slot 1) checks which pixel each address generator receives.
module tb_pixel_dispatcher;
  logic [1:0]  pf;
  logic [15:0] pix0, pix1, ag0, ag1;
  int          checks = 0, failures = 0;

  pixel_dispatcher #(.W(16)) dut (.pf, .pix0, .pix1, .ag0, .ag1);

  task automatic check(logic [15:0] e0, logic [15:0] e1);
    #1;
    checks++;
    if (ag0 !== e0 || ag1 !== e1) begin
      failures++;
      $display("FAIL pf=%b: ag=%h,%h expected %h,%h", pf, ag0, ag1, e0, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      pix0 = 16'($urandom); pix1 = 16'($urandom);
      pf = 2'b11; check(pix0, pix1);   // two bilinear pixels
      pf = 2'b01; check(pix0, pix0);   // pixel 0 uses both generators
      pf = 2'b10; check(pix1, pix1);   // pixel 1 uses both generators
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
