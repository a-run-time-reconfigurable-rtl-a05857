// bilinear_filter: bilinear texture filter built from three linear filters.
//
// The four-tap weighted sum of a 2x2 texel footprint is rearranged so that two
// linear filters interpolate along Y (Li0 = T1 + (T0 - T1) x YF and
// Li1 = T3 + (T2 - T3) x YF) and a third interpolates their results along X
// (Bi = Li1 + (Li0 - Li1) x XF). Texel numbering follows that arrangement:
// T0 has weight XF x YF, T1 XF x (1-YF), T2 (1-XF) x YF, T3 (1-XF) x (1-YF).
// Combinational; the texture filter is one pipeline stage.
// Interface: t[0:3], xf, yf -> y.
module bilinear_filter
  import tex_pkg::*;
(
  input  fp16_t t [4],
  input  fp16_t xf,
  input  fp16_t yf,
  output fp16_t y
);

  fp16_t li0, li1;

  linear_filter u_li0 (.t0(t[0]), .t1(t[1]), .fc(yf), .y(li0));
  linear_filter u_li1 (.t0(t[2]), .t1(t[3]), .fc(yf), .y(li1));
  linear_filter u_li2 (.t0(li0),  .t1(li1),  .fc(xf), .y(y));

endmodule
