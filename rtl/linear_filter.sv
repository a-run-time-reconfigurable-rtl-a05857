// linear_filter: the linear texture filter Li = T1 + (T0 - T1) x FC.
//
// This is the arrangement of the two-tap interpolation T1 x (1 - FC) + T0 x FC
// that needs one subtracter, one multiplier and one adder, and it is the
// building block of the bilinear, trilinear and anisotropic filters. T0 is the
// value weighted by FC and T1 the value weighted by 1 - FC. Each of the three
// operations rounds on its own (16-bit floating point). Combinational.
// Interface: t0, t1, fc -> y.
module linear_filter
  import tex_pkg::*;
(
  input  fp16_t t0,
  input  fp16_t t1,
  input  fp16_t fc,
  output fp16_t y
);

  fp16_t diff, prod;

  fp16_add u_sub (.a(t0),   .b(t1),   .sub(1'b1), .y(diff));
  fp16_mul u_mul (.a(diff), .b(fc),               .y(prod));
  fp16_add u_add (.a(t1),   .b(prod), .sub(1'b0), .y(y));

endmodule
