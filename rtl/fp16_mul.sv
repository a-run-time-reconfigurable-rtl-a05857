// fp16_mul: combinational 16-bit floating-point multiplier (y = a * b).
//
// This is the "x" of every linear filter: a texel difference times a
// coordinate fraction. The two 11-bit significands (hidden one included) are
// multiplied into a 22-bit product, normalised by at most one place and rounded
// to nearest, ties to even; the exponents are added and the bias removed.
// Special values follow the same choices as fp16_add: subnormal inputs read as
// zero, results below 2^-14 flush to +0, overflow gives a signed infinity, and
// all-ones exponents on the inputs are not supported.
// Interface: a, b -> y, no clock; latency is zero.
module fp16_mul
  import tex_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);

  logic              s;
  logic [10:0]       ma, mb;
  logic [21:0]       p;
  logic [10:0]       mant;
  logic              g, st, rnd;
  logic [11:0]       mant_r;
  logic signed [7:0] e;

  always_comb begin
    s  = a[15] ^ b[15];
    ma = {1'b1, a[9:0]};
    mb = {1'b1, b[9:0]};
    p  = ma * mb;
    e  = $signed({3'b000, a[14:10]}) + $signed({3'b000, b[14:10]}) - 8'sd15;
    if (p[21]) begin
      mant = p[21:11];
      g    = p[10];
      st   = |p[9:0];
      e    = e + 8'sd1;
    end else begin
      mant = p[20:10];
      g    = p[9];
      st   = |p[8:0];
    end
    rnd    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + {11'd0, rnd};
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      e      = e + 8'sd1;
    end

    if (a[14:10] == 5'd0 || b[14:10] == 5'd0) y = FP16_ZERO;
    else if (e <= 8'sd0)                      y = FP16_ZERO;
    else if (e >= 8'sd31)                     y = {s, 5'h1F, 10'd0};
    else                                      y = {s, e[4:0], mant_r[9:0]};
  end

endmodule
