// dht_pkg: widths and helper functions shared by the reconfigurable
// Discrete Hilbert Transform (DHT) blocks.
//
// The DHT of an M-point frame is h = K x, where K is an M x M circulant
// (Toeplitz) matrix. Entry K[n][m] depends only on d = (n - m) mod M:
//   d even            -> 0
//   d odd,  d < M/2   -> +k_((d+1)/2)
//   d odd,  d > M/2   -> -k_((M-d+1)/2)
// with k_q = (2/M) cot(pi (2q-1) / M), q = 1 .. M/4.
// The constants are stored as signed fixed point with KFRAC fractional bits.
// Word widths are this design's choice; the source of the method gives none.
package dht_pkg;

  // Input sample width (two's complement integer samples).
  parameter int unsigned XW    = 16;
  // Width and fractional bits of the stored k constants (|k| < 2/pi).
  parameter int unsigned KW    = 16;
  parameter int unsigned KFRAC = 15;
  // Width of one kernel product-sum and of the output accumulators.
  parameter int unsigned PW    = 40;
  // Width of an output sample h(n) after removing the KFRAC scaling.
  parameter int unsigned HW    = 24;

  // Address of k_1 for frame length m in the packed constant table:
  // the table holds M/4 constants for every m = 4, 8, ..., Mmax, in order.
  function automatic int unsigned k_base(input int unsigned m);
    int unsigned q;
    q = m / 4;
    return (q * (q - 1)) / 2;
  endfunction

  // The constants are evaluated with integers only (128-bit fixed point,
  // 48 fractional bits), so that any tool can fill the constant table at
  // elaboration. For a frame length m, sin and cos of a = pi/m come from
  // their Taylor series; the angles t_q = (2q-1) a then follow by rotating
  // (cos t, sin t) by 2a per step, and
  //   k_q = round(2^KFRAC * (2/m) * cos(t_q) / sin(t_q)).
  localparam int unsigned     CF     = 48;
  localparam logic signed [127:0] PI_Q48 = 128'sd884279719003555;  // round(pi * 2^48)

  typedef struct packed {
    logic signed [127:0] c;
    logic signed [127:0] s;
  } cs_t;

  // cos and sin of pi/m, m >= 4 (angle at most pi/4).
  function automatic cs_t base_angle(input int unsigned m);
    logic signed [127:0] th, th2, ts, tc;
    cs_t r;
    th  = PI_Q48 / 128'(m);
    th2 = (th * th) >>> CF;
    r.s = th;
    r.c = 128'sd1 <<< CF;
    ts  = r.s;
    tc  = r.c;
    for (int n = 1; n <= 12; n++) begin
      ts  = -(((ts * th2) >>> CF) / 128'((2 * n) * (2 * n + 1)));
      tc  = -(((tc * th2) >>> CF) / 128'((2 * n - 1) * (2 * n)));
      r.s = r.s + ts;
      r.c = r.c + tc;
    end
    return r;
  endfunction

  // Rotate angle pair p by angle pair d: (cos(p+d), sin(p+d)).
  function automatic cs_t rotate(input cs_t p, input cs_t d);
    cs_t r;
    r.c = (p.c * d.c - p.s * d.s) >>> CF;
    r.s = (p.s * d.c + p.c * d.s) >>> CF;
    return r;
  endfunction

  // k from cos and sin of its angle, for frame length m.
  function automatic logic signed [KW-1:0] k_from(input cs_t p, input int unsigned m);
    logic signed [127:0] num, den;
    num = p.c <<< (KFRAC + 1);
    den = p.s * 128'(m);
    return KW'((num + den / 2) / den);
  endfunction

  // Number of constants stored for frame lengths 4 .. mmax.
  function automatic int unsigned k_table_size(input int unsigned mmax);
    return ((mmax / 4) * (mmax / 4 + 1)) / 2;
  endfunction

endpackage
