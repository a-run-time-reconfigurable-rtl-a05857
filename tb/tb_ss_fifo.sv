// tb_ss_fifo: random pushes and pops (never into a full or out of an empty
// FIFO) against a queue model: head value, empty, full and count each cycle,
// filling to full and draining to empty several times.
module tb_ss_fifo;
  localparam int DEPTH = 16;
  logic        clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [17:0] din = 0, dout;
  logic        full, empty;
  logic [4:0]  count;
  logic [17:0] q[$];
  int          checks = 0, failures = 0, fulls = 0;

  ss_fifo #(.DEPTH(DEPTH), .W(18)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || int'(count) != q.size() ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d size=%0d count=%0d empty=%b full=%b", i, q.size(), count, empty, full);
      end
      if (full) fulls++;
      // bias toward filling in the first half of each 400-cycle period
      push = !full && (($urandom % 100) < (((i / 200) % 2) ? 30 : 70));
      pop  = !empty && (($urandom % 100) < (((i / 200) % 2) ? 70 : 30));
      din  = 18'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
      #1;
    end
    checks++;
    if (fulls == 0) begin
      failures++;
      $display("FAIL never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
