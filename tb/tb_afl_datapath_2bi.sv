// tb_afl_datapath_2bi: drives bilinear results straight into the additional
// filter datapath and checks R0/R1 after each operation:
//   bilinear into one or both registers, trilinear with both level orders and
//   both destination slots, and n:1 anisotropic accumulation over n cycles
//   (computed independently as the rounded running sum of Tri/n).
module tb_afl_datapath_2bi;
  import tex_pkg::*;
  import fp16_ref_pkg::*;

  logic        clk = 0, rst_n = 0, valid = 0, first = 0, lod_swap = 0;
  ft_e         ft = FT_BI;
  logic [1:0]  ar = 0, pf = 0;
  logic [15:0] bi0 = 0, bi1 = 0, lf = 0, r0, r1;
  int          checks = 0, failures = 0;

  afl_datapath_2bi dut (.clk, .rst_n, .valid, .ft, .ar, .pf, .first, .lod_swap,
                        .bi0, .bi1, .lf, .r0, .r1);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [15:0] got, logic [15:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] old0, old1, e, t;
    logic [15:0] l0, l1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      old0 = r0; old1 = r1;
      case ($urandom % 3)
        0: begin   // bilinear
          ft = FT_BI; pf = 2'($urandom % 3 + 1); first = 1;
          bi0 = rnd_unit(); bi1 = rnd_unit(); valid = 1;
          step();
          valid = 0;
          expect_eq(r0, pf[0] ? bi0 : old0, "Bi R0");
          expect_eq(r1, pf[1] ? bi1 : old1, "Bi R1");
        end
        1: begin   // trilinear
          ft = FT_TRI; pf = ($urandom % 2) ? 2'b10 : 2'b01; first = 1;
          lod_swap = 1'($urandom);
          bi0 = rnd_unit(); bi1 = rnd_unit(); lf = rnd_unit(); lf[15] = 0; valid = 1;
          l0 = lod_swap ? bi1 : bi0;
          l1 = lod_swap ? bi0 : bi1;
          t  = r_lin(l0, l1, lf);
          step();
          valid = 0;
          expect_eq(pf[0] ? r0 : r1, t, "Tri result");
          expect_eq(pf[0] ? r1 : r0, pf[0] ? old1 : old0, "Tri other register");
        end
        default: begin   // anisotropic
          ft = FT_ANI; ar = 2'($urandom); pf = ($urandom % 2) ? 2'b10 : 2'b01;
          e = 16'h0000;
          for (int k = 0; k < (2 << ar); k++) begin
            first = (k == 0);
            lod_swap = 1'($urandom);
            bi0 = rnd_unit(); bi1 = rnd_unit(); lf = rnd_unit(); lf[15] = 0; valid = 1;
            l0 = lod_swap ? bi1 : bi0;
            l1 = lod_swap ? bi0 : bi1;
            e  = r_add(e, r_al(r_lin(l0, l1, lf), ar));
            step();
            @(negedge clk);
          end
          valid = 0;
          expect_eq(pf[0] ? r0 : r1, e, $sformatf("Ani %0d:1 result", 2 << ar));
          expect_eq(pf[0] ? r1 : r0, pf[0] ? old1 : old0, "Ani other register");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
