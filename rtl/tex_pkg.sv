// tex_pkg: types and constants shared by the two-bilinear all-purpose texture unit.
//
// Values are 16-bit floating point in the s5.10 layout (1 sign bit, 5 exponent
// bits with bias 15, 10 fraction bits), the operation width the texture filter
// is built around. The filter type uses the two-bit code of the design
// (00 bilinear, 01 trilinear, 10 anisotropic); the unused code 11 is this
// design's marker for "no pixel" (an empty sampler-state FIFO).
// The anisotropic ratio n = 2, 4, 8, 16 is carried as a two-bit code
// AR = log2(n) - 1, another choice of this design.
package tex_pkg;

  typedef logic [15:0] fp16_t;

  typedef enum logic [1:0] {
    FT_BI   = 2'b00,
    FT_TRI  = 2'b01,
    FT_ANI  = 2'b10,
    FT_NONE = 2'b11
  } ft_e;

  localparam int unsigned PIX_W  = 16;  // pixel data width through the fair fetching logic
  localparam int unsigned ITER_W = 4;   // log2(16): iteration counter for two bilinears

  localparam fp16_t FP16_ZERO = 16'h0000;

  // Number of iterations minus one of an operation on two bilinears:
  // one for bilinear and trilinear, n for n:1 anisotropic.
  function automatic logic [ITER_W-1:0] iter_max_of(ft_e ft, logic [1:0] ar);
    logic [ITER_W:0] one = 1;
    return (ft == FT_ANI) ? ITER_W'((one << (3'(ar) + 3'd1)) - 1'b1) : '0;
  endfunction

endpackage
