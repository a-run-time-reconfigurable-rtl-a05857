// aniso_logic: the anisotropic logic (AL), x / n for n = 2, 4, 8, 16.
//
// An n:1 anisotropic result is the sum of n trilinear results each divided by
// n. Because n is a power of two, the division is a subtraction of log2(n)
// from the exponent. The ratio arrives as the code AR = log2(n) - 1, this
// design's encoding. Zero stays zero; a result whose exponent would drop below
// 1 flushes to +0 (no subnormals). Combinational.
// Interface: x, ar -> y.
module aniso_logic
  import tex_pkg::*;
(
  input  fp16_t      x,
  input  logic [1:0] ar,
  output fp16_t      y
);

  logic [5:0] e;

  always_comb begin
    e = {1'b0, x[14:10]} - ({4'd0, ar} + 6'd1);
    if (x[14:10] == 5'd0 || e[5] || e == 6'd0) y = FP16_ZERO;
    else                                       y = {x[15], e[4:0], x[9:0]};
  end

endmodule
