// mbap_texture_filter: two-bilinear all-purpose texture filter.
//
// Two bilinear filters share one additional filter logic (one extra linear
// filter, one anisotropic divider, one accumulator adder and one 4-bit
// iteration control). Throughput: two bilinear pixels per cycle, one
// trilinear pixel per cycle (both bilinear filters work on the two mip levels
// of one pixel), one n:1 anisotropic pixel every n cycles.
// The filter is one pipeline stage: texels and fractions from the two address
// generators / texture caches are taken combinationally in the cycle the
// operation is issued, and the result is in r0/r1 after the clock edge of its
// last iteration. lod_par is the odd/even cycle bit; bilinear filter 0 works on
// mip level lod_par and bilinear filter 1 on the other level of the pair.
// iter and last tell the issue logic which anisotropic sample is being filtered
// and when the operation ends.
module mbap_texture_filter
  import tex_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [1:0]        pf,
  input  ft_e               ft,
  input  logic [1:0]        ar,
  input  fp16_t             tex0 [4],
  input  fp16_t             xf0,
  input  fp16_t             yf0,
  input  fp16_t             tex1 [4],
  input  fp16_t             xf1,
  input  fp16_t             yf1,
  input  fp16_t             lf,
  output fp16_t             r0,
  output fp16_t             r1,
  output logic [ITER_W-1:0] iter,
  output logic              first,
  output logic              last,
  output logic              lod_par
);

  fp16_t             bi0, bi1;
  logic [ITER_W-1:0] iter_max;

  bilinear_filter u_bi0 (.t(tex0), .xf(xf0), .yf(yf0), .y(bi0));
  bilinear_filter u_bi1 (.t(tex1), .xf(xf1), .yf(yf1), .y(bi1));

  afl_ctrl_2bi u_ctrl (
    .clk, .rst_n, .valid, .ft, .ar,
    .iter_max, .cnt(iter), .first, .last
  );

  afl_datapath_2bi u_dp (
    .clk, .rst_n, .valid, .ft, .ar, .pf, .first,
    .lod_swap(lod_par), .bi0, .bi1, .lf, .r0, .r1
  );

  // odd/even cycle bit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lod_par <= 1'b0;
    else        lod_par <= ~lod_par;
  end

endmodule
