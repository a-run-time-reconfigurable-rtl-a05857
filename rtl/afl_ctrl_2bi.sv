// afl_ctrl_2bi: additional filter control for two bilinears as the fundamental element.
//
// With two bilinear filters working together, a bilinear or a trilinear
// operation finishes in one iteration and an n:1 anisotropic operation takes n
// iterations (one trilinear per cycle). The control decodes the filter type and
// anisotropic ratio into "iterations minus one" (0 for Bi and Tri, n-1 for Ani,
// at most 15, hence a log2(16) = 4-bit counter) and counts the iterations of
// the operation in progress. The decode table is the design's; the counter, its
// reset value and the first/last flags are this implementation's choices.
// Interface: valid, ft, ar in; iter_max, cnt, first, last out. cnt advances on
// every clock edge with valid high and returns to 0 after the last iteration.
module afl_ctrl_2bi
  import tex_pkg::*;
#(
  parameter int unsigned CNT_W = ITER_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  ft_e              ft,
  input  logic [1:0]       ar,
  output logic [CNT_W-1:0] iter_max,
  output logic [CNT_W-1:0] cnt,
  output logic             first,
  output logic             last
);

  always_comb begin
    iter_max = CNT_W'(iter_max_of(ft, ar));
    first    = (cnt == '0);
    last     = (cnt == iter_max);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (valid) cnt <= last ? '0 : cnt + 1'b1;
  end

endmodule
