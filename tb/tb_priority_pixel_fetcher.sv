// tb_priority_pixel_fetcher: all 16 combinations of two filter types
// (bilinear, trilinear, anisotropic, none) against the fetch table of the
// two-bilinear texture unit, written out here case by case.
module tb_priority_pixel_fetcher;
  import tex_pkg::*;

  ft_e        ft0, ft1;
  logic [1:0] pf;
  int         checks = 0, failures = 0;

  priority_pixel_fetcher dut (.ft0, .ft1, .pf);

  function automatic logic [1:0] table_pf(ft_e a, ft_e b);
    if (a == FT_BI   && b == FT_BI)   return 2'b11;  // case 0
    if (a == FT_TRI)                  return 2'b01;  // case 1 (pf0 = 1, pf1 = 0)
    if (a == FT_ANI)                  return 2'b01;  // case 2
    if (a == FT_BI   && b == FT_NONE) return 2'b01;  // case 3
    if (a == FT_NONE && b == FT_BI)   return 2'b10;  // case 4
    if (a == FT_NONE && b != FT_NONE) return 2'b10;  // case 6
    if (a == FT_BI)                   return 2'b01;  // case 7
    return 2'b00;                                    // both empty
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        ft0 = ft_e'(a); ft1 = ft_e'(b);
        #1;
        checks++;
        if (pf !== table_pf(ft0, ft1)) begin
          failures++;
          $display("FAIL ft0=%0d ft1=%0d: pf=%b expected %b", a, b, pf, table_pf(ft0, ft1));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
