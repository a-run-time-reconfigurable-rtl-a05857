// fp16_add: combinational 16-bit floating-point adder/subtracter (y = a + b or a - b).
//
// This is the "+" and "-" of every linear filter and the accumulator of the
// anisotropic datapath. The larger-magnitude operand is kept, the other is
// shifted right to its exponent with guard, round and sticky bits, the
// significands are added or subtracted, the result is normalised with a
// leading-zero count and rounded to nearest, ties to even.
// The format and the adder's role come from the texture filter design; the
// internal algorithm and the treatment of special values are this design's
// choices: subnormal inputs read as zero, results below 2^-14 flush to +0, an
// exact cancellation gives +0, overflow gives a signed infinity. Inputs with an
// all-ones exponent (infinity, NaN) are not supported.
// Interface: a, b, sub -> y, no clock; latency is zero.
module fp16_add
  import tex_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  input  logic  sub,
  output fp16_t y
);

  logic        sa, sb, sl, ss;
  logic [4:0]  ea, eb, el, es;
  logic [10:0] ma, mb, ml, ms;
  logic [4:0]  d;
  logic [13:0] ml_x, ms_x;     // significand with 3 extra low bits (guard, round, sticky)
  logic [13:0] ms_sh;
  logic        sticky;
  logic [14:0] sum;
  logic [3:0]  lz;
  logic [13:0] norm;
  logic signed [7:0] e_n;
  logic [10:0] mant;
  logic        g, r, st, rnd;
  logic [11:0] mant_r;
  logic signed [7:0] e_r;

  always_comb begin
    sa = a[15];
    sb = b[15] ^ sub;
    ea = a[14:10];
    eb = b[14:10];
    ma = (ea == 5'd0) ? 11'd0 : {1'b1, a[9:0]};
    mb = (eb == 5'd0) ? 11'd0 : {1'b1, b[9:0]};

    // order by magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sl = sa; el = ea; ml = ma; ss = sb; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; ss = sa; es = ea; ms = ma;
    end

    d    = el - es;
    ml_x = {ml, 3'b000};
    ms_x = {ms, 3'b000};
    if (ms == 11'd0) begin
      ms_sh  = '0;
      sticky = 1'b0;
    end else if (d >= 5'd14) begin
      ms_sh  = '0;
      sticky = 1'b1;
    end else begin
      ms_sh  = ms_x >> d;
      sticky = |(ms_x & ((14'd1 << d) - 14'd1));
    end
    ms_sh[0] = ms_sh[0] | sticky;

    if (sl == ss) sum = {1'b0, ml_x} + {1'b0, ms_sh};
    else          sum = {1'b0, ml_x} - {1'b0, ms_sh};

    // normalise: the leading one goes to bit 13 (bit 14 after a carry)
    lz = 4'd0;
    for (int i = 0; i <= 13; i++)
      if (sum[i]) lz = 4'(13 - i);
    if (sum[14]) begin
      norm = {sum[14:2], sum[1] | sum[0]};
      e_n  = $signed({3'b000, el}) + 8'sd1;
    end else begin
      norm = sum[13:0] << lz;
      e_n  = $signed({3'b000, el}) - $signed({4'b0000, lz});
    end

    mant   = norm[13:3];
    g      = norm[2];
    r      = norm[1];
    st     = norm[0];
    rnd    = g & (r | st | mant[0]);
    mant_r = {1'b0, mant} + {11'd0, rnd};
    e_r    = e_n;
    if (mant_r[11]) begin
      mant_r = mant_r >> 1;
      e_r    = e_n + 8'sd1;
    end

    if (sum == 15'd0 || ml == 11'd0) y = FP16_ZERO;
    else if (e_r <= 8'sd0)          y = FP16_ZERO;
    else if (e_r >= 8'sd31)         y = {sl, 5'h1F, 10'd0};
    else                            y = {sl, e_r[4:0], mant_r[9:0]};
  end

endmodule
