// tb_priority_sequence_generator: checks both input-output mappings
// (case 0 straight, case 1 crossed) and that applying the generator twice
// with the same case restores the original order.
module tb_priority_sequence_generator;
  logic        swap;
  logic [15:0] i0, i1, o0, o1, b0, b1;
  int          checks = 0, failures = 0;

  priority_sequence_generator #(.W(16)) dut  (.swap, .i0, .i1, .o0, .o1);
  priority_sequence_generator #(.W(16)) back (.swap, .i0(o0), .i1(o1), .o0(b0), .o1(b1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      swap = 1'(i);
      i0 = 16'($urandom); i1 = 16'($urandom);
      #1;
      checks++;
      if (o0 !== (swap ? i1 : i0) || o1 !== (swap ? i0 : i1)) begin
        failures++;
        $display("FAIL mapping swap=%b i=%h,%h o=%h,%h", swap, i0, i1, o0, o1);
      end
      checks++;
      if (b0 !== i0 || b1 !== i1) begin
        failures++;
        $display("FAIL recovery swap=%b", swap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
