// fp16_ref_pkg: reference arithmetic for the testbenches.
//
// Works through the simulator's double-precision reals: every 16-bit value is
// exact as a double, and so is the sum or product of two of them, so rounding
// the double result to 16 bits (nearest, ties to even) gives the exactly
// rounded answer. The same conventions as the hardware: subnormal inputs read
// as zero, results below 2^-14 become +0, overflow becomes signed infinity.
// Also holds the filter formulas built from those operations and random
// operand generators.
package fp16_ref_pkg;

  function automatic real to_real(logic [15:0] h);
    logic [63:0] b;
    if (h[14:10] == 5'd0) return 0.0;
    b = {h[15], 11'(int'(h[14:10]) - 15 + 1023), h[9:0], 42'd0};
    return $bitstoreal(b);
  endfunction

  function automatic logic [15:0] from_real(real x);
    logic [63:0] b;
    int          e;
    logic [11:0] m;
    logic [41:0] rem;
    if (x == 0.0) return 16'h0000;
    b   = $realtobits(x);
    e   = int'(b[62:52]) - 1023;
    m   = {2'b01, b[51:42]};
    rem = b[41:0];
    if (rem > 42'h200_0000_0000 || (rem == 42'h200_0000_0000 && m[0])) m = m + 12'd1;
    if (m[11]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e < -14) return 16'h0000;
    if (e > 15)  return {b[63], 5'h1F, 10'd0};
    return {b[63], 5'(e + 15), m[9:0]};
  endfunction

  function automatic logic [15:0] r_add(logic [15:0] a, logic [15:0] b);
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [15:0] r_sub(logic [15:0] a, logic [15:0] b);
    return from_real(to_real(a) - to_real(b));
  endfunction

  function automatic logic [15:0] r_mul(logic [15:0] a, logic [15:0] b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  // T1 + (T0 - T1) * FC, each step rounded
  function automatic logic [15:0] r_lin(logic [15:0] t0, logic [15:0] t1, logic [15:0] fc);
    return r_add(t1, r_mul(r_sub(t0, t1), fc));
  endfunction

  function automatic logic [15:0] r_bil(logic [15:0] t0, logic [15:0] t1, logic [15:0] t2,
                                        logic [15:0] t3, logic [15:0] xf, logic [15:0] yf);
    return r_lin(r_lin(t0, t1, yf), r_lin(t2, t3, yf), xf);
  endfunction

  // divide by n = 2^(ar+1)
  function automatic logic [15:0] r_al(logic [15:0] x, logic [1:0] ar);
    return from_real(to_real(x) / real'(2 ** (int'(ar) + 1)));
  endfunction

  // random finite value with exponent field in [emin, emax]
  function automatic logic [15:0] rnd_fp(int emin, int emax);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(emin + int'($urandom % 32'(emax - emin + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

  // random texel or fraction in [0, 1], now and then exactly 0 or 1
  function automatic logic [15:0] rnd_unit();
    int unsigned r = $urandom % 16;
    if (r == 0) return 16'h0000;
    if (r == 1) return 16'h3C00;
    return {1'b0, 5'(5 + $urandom % 10), 10'($urandom)};
  endfunction

  // ---- model of an address generator with its texture cache ----
  // Texel k (0..3) of the footprint of pixel pix at mip level lod (0/1 of the
  // pair) and anisotropic sample it, and the fractions that go with it. Each is
  // a fixed pseudo-random function of its arguments, so the value does not
  // depend on which generator fetched it.
  function automatic int unsigned tm_hash(int unsigned a, int unsigned b, int unsigned c, int unsigned d);
    int unsigned h = a * 32'h9E3779B1 ^ (b * 32'h85EBCA77) ^ (c * 32'hC2B2AE3D) ^ (d * 32'h27D4EB2F);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return h ^ (h >> 13);
  endfunction

  function automatic logic [15:0] tm_texel(logic [15:0] pix, logic lod, logic [3:0] it, int k);
    int unsigned h = tm_hash(pix, lod + 2, it + 7, k + 11);
    return {1'b0, 5'(10 + h % 5), 10'(h >> 8)};   // in [2^-5, 1)
  endfunction

  function automatic logic [15:0] tm_frac(logic [15:0] pix, logic lod, logic [3:0] it, int which);
    int unsigned h = tm_hash(pix, lod + 5, it + 3, which + 101);
    return {1'b0, 5'(9 + h % 6), 10'(h >> 8)};    // in [2^-6, 1)
  endfunction

  function automatic logic [15:0] tm_lf(logic [15:0] pix);
    return tm_frac(pix, 1'b0, 4'd0, 7);
  endfunction

  // bilinear of one fetch of the model
  function automatic logic [15:0] tm_bil(logic [15:0] pix, logic lod, logic [3:0] it);
    return r_bil(tm_texel(pix, lod, it, 0), tm_texel(pix, lod, it, 1), tm_texel(pix, lod, it, 2),
                 tm_texel(pix, lod, it, 3), tm_frac(pix, lod, it, 0), tm_frac(pix, lod, it, 1));
  endfunction

  // expected result of a pixel: ft 0 bilinear, 1 trilinear, 2 anisotropic n = 2^(ar+1)
  function automatic logic [15:0] tm_expect(logic [1:0] ft, logic [15:0] pix, logic [1:0] ar);
    logic [15:0] acc = 16'h0000;
    if (ft == 2'd0) return tm_bil(pix, 1'b0, 4'd0);
    if (ft == 2'd1) return r_lin(tm_bil(pix, 1'b0, 4'd0), tm_bil(pix, 1'b1, 4'd0), tm_lf(pix));
    for (int k = 0; k < (2 << ar); k++)
      acc = r_add(acc, r_al(r_lin(tm_bil(pix, 1'b0, 4'(k)), tm_bil(pix, 1'b1, 4'(k)), tm_lf(pix)), ar));
    return acc;
  endfunction

endpackage
