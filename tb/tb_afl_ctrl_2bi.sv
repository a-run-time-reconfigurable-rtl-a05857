// tb_afl_ctrl_2bi: checks the iteration control of the two-bilinear filter.
// For every filter type and anisotropic ratio, an operation is held valid
// until last; the number of cycles must be 1 for bilinear and trilinear and n
// for n:1 anisotropic, the counter must step 0, 1, ... and first must mark
// only the first cycle. Idle cycles must not move the counter.
module tb_afl_ctrl_2bi;
  import tex_pkg::*;

  logic             clk = 0, rst_n = 0, valid = 0;
  ft_e              ft = FT_BI;
  logic [1:0]       ar = 0;
  logic [3:0]       iter_max, cnt;
  logic             first, last;
  int               checks = 0, failures = 0;

  afl_ctrl_2bi dut (.clk, .rst_n, .valid, .ft, .ar, .iter_max, .cnt, .first, .last);

  always #5 clk = ~clk;

  task automatic expect_eq(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic run_op(ft_e f, logic [1:0] a, int exp_cycles);
    int n = 0;
    ft = f; ar = a; valid = 1;
    forever begin
      @(negedge clk);
      expect_eq(int'(cnt), n, "counter step");
      expect_eq(int'(first), (n == 0), "first flag");
      n++;
      if (last || n > 40) break;
    end
    expect_eq(n, exp_cycles, $sformatf("cycles of ft=%0d ar=%0d", f, a));
    @(posedge clk); #1;
    valid = 0;
    expect_eq(int'(cnt), 0, "counter back to 0");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(int'(cnt), 0, "reset value");
    for (int rep = 0; rep < 3; rep++) begin
      run_op(FT_BI, 2'($urandom), 1);
      run_op(FT_TRI, 2'($urandom), 1);
      for (int a = 0; a < 4; a++) begin
        run_op(FT_ANI, 2'(a), 2 << a);
        expect_eq(int'(iter_max), (2 << a) - 1, "iter_max of Ani");
      end
      // idle cycles with a pending anisotropic type leave the counter alone
      ft = FT_ANI; ar = 2'd3; valid = 0;
      repeat (3) @(negedge clk);
      expect_eq(int'(cnt), 0, "idle counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
