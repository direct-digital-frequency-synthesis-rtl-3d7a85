// tltl_pkg: constants and elaboration-time functions shared by the
// two-level table-lookup DDFS.
//
// All angles in the synthesizer are plain radians held as unsigned
// fixed-point numbers with N fractional bits (N is the output precision).
// The functions below compute, when the design is elaborated, the fixed
// constants the hardware needs: multiples of pi/4 (octant boundaries and the
// 2*pi wrap value of the phase accumulator) and the contents of the three
// lookup tables (cos(alpha), sin(alpha) and gamma^3/6). Nothing here is
// hardware by itself; the functions are only called from localparam and
// table initialisers, so the ROMs are ordinary constant arrays after
// elaboration.
//
// Arithmetic: pi is held as the 64-bit constant round(pi * 2^61). cos and sin
// are evaluated with a Taylor series in 64-bit signed fixed point with
// FB = 30 fractional bits (argument below 1, twelve terms), which leaves an
// error near 2^-29, far below the LSB for any N up to 24. Results are rounded
// to nearest. The table formulas themselves follow the published design; the way they
// are evaluated here is this implementation's own.
package tltl_pkg;

  // round(pi * 2^61)
  localparam logic [63:0] PI_Q61 = 64'h6487_ED51_10B4_611A;

  // Fractional bits of the internal Taylor-series evaluation.
  localparam int FB = 30;

  // round(k * pi/4 * 2^n), for k = 0..8 and n <= 40.
  function automatic logic [47:0] kpi4(input int unsigned k, input int unsigned n);
    logic [127:0] p;
    p = 128'(PI_Q61) * 128'(k);                 // k*pi * 2^61
    p = p + (128'd1 << (63 - n - 1));           // + half LSB of the result
    return 48'(p >> (63 - n));                  // k*pi/4 * 2^n = k*pi*2^61 / 2^(63-n)
  endfunction

  // Taylor series of cos (want_sin = 0) or sin (want_sin = 1) of
  // x = xnum * 2^-xfrac (0 <= x < 1, xfrac <= FB), result scaled by 2^FB.
  function automatic longint trig_fb(input longint xnum, input int unsigned xfrac,
                                     input bit want_sin);
    longint x, term, sum;
    x    = xnum <<< (FB - xfrac);
    term = want_sin ? x : (longint'(1) <<< FB);
    sum  = term;
    for (int k = 1; k <= 12; k++) begin
      term = (term * x) >>> FB;
      term = (term * x) >>> FB;
      if (want_sin) term = -(term / longint'((2*k) * (2*k + 1)));
      else          term = -(term / longint'((2*k - 1) * (2*k)));
      sum = sum + term;
    end
    return sum;
  endfunction

  // Round a 2^FB-scaled value to n fractional bits and saturate it to n bits
  // (so 1.0 becomes 1 - 2^-n).
  function automatic logic [31:0] to_frac(input longint v, input int unsigned n);
    longint r, maxv;
    r    = (v + (longint'(1) <<< (FB - n - 1))) >>> (FB - n);
    maxv = (longint'(1) <<< n) - 1;
    if (r > maxv) r = maxv;
    if (r < 0) r = 0;
    return 32'(r);
  endfunction

  // COS ROM entry: cos(a * 2^-(n/4)), n fractional bits.
  function automatic logic [31:0] cos_entry(input int unsigned a, input int unsigned n);
    return to_frac(trig_fb(longint'(a), n / 4, 1'b0), n);
  endfunction

  // SIN ROM entry: sin(a * 2^-(n/4)), n fractional bits.
  function automatic logic [31:0] sin_entry(input int unsigned a, input int unsigned n);
    return to_frac(trig_fb(longint'(a), n / 4, 1'b1), n);
  endfunction

  // gamma^3/6 ROM entry for gamma = g * 2^-(n/2), LSB weight 2^-n:
  // round(g^3 / (6 * 2^(n/2))), computed exactly in integers.
  function automatic logic [31:0] cube_entry(input int unsigned g, input int unsigned n);
    longint num, den;
    num = longint'(g) * longint'(g) * longint'(g);
    den = longint'(6) <<< (n / 2);
    return 32'((2 * num + den) / (2 * den));
  endfunction

endpackage
