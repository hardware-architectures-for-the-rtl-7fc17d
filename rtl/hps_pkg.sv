// hps_pkg: shared number formats and coefficient arithmetic for the Harmonized
// Parabolic Synthesis (HPS) inverse square root unit.
//
// Every data path of the unit is an unsigned or two's-complement fixed-point
// word described by a width W and a count F of fractional bits (the LSB weighs
// 2^-F). The widths are the ones of the 32- and 512-interval implementations of
// the reference design; the position of the binary point in each path is this
// design's reading of those widths (the MSB of each path is placed at the
// highest weight the path can reach). hps_fmt() returns the formats for an
// interval count; only 32 and 512 are defined.
//
// The package also holds the constant functions that compute the second
// sub-function coefficients at elaboration time, so the look-up table needs no
// data file. With c1 = 0 the first sub-function is s1(x) = 1 - x, and the help
// function f_help(x) = f_org(x)/s1(x), f_org(x) = 2/sqrt(3x+1) - 1, simplifies
// to the singularity-free form
//     f_help(x) = 3 / (s * (2 + s)),   s = sqrt(3x+1),
// whose value at x = 1 is the required limit 3/8. Per interval i of I:
//     l2 = f_help(i/I)
//     k2 = f_help((i+1)/I) - l2
//     c2 = 4 f_help((i+0.5)/I) - 4 l2 - 2 k2
//     j2 = k2 + c2
// All of it is evaluated in 128-bit integer arithmetic with QF fractional bits
// and then rounded to nearest in the target format.
package hps_pkg;

  // Formats that do not depend on the interval count.
  localparam int unsigned V_W   = 15;  // input v in [1,4): 2 integer bits
  localparam int unsigned V_F   = 13;
  localparam int unsigned T_W   = 14;  // constant 1/3, weights 2^-2 .. 2^-15
  localparam int unsigned T_F   = 15;
  localparam int unsigned X_W   = 16;  // x in [0,1)
  localparam int unsigned X_F   = 16;
  localparam int unsigned S1_W  = 17;  // s1 = 1 - x in (0,1]
  localparam int unsigned Y_W   = 16;  // y in (0,1]
  localparam int unsigned Y_F   = 15;
  localparam int unsigned Z_W   = 17;  // z = 1/sqrt(v) in (0.5,1]
  localparam int unsigned Z_F   = 16;
  localparam int unsigned ZZ_W  = 18;  // zz = 1/v in (0.25,1]
  localparam int unsigned ZZ_F  = 17;

  // The constant 1/3 truncated to T_W bits: binary 0.0101...01 (ends at 2^-15).
  localparam logic [T_W-1:0] ONE_THIRD = T_W'((2**T_F) / 3);

  // Formats that depend on the interval count.
  typedef struct packed {
    int unsigned idx_w;    // interval index xi = floor(I*x)
    int unsigned xw_w;     // position in interval xw; fractional only
    int unsigned xxw_w;    // xw^2, truncated; fractional only
    int unsigned l2_w,   l2_f;
    int unsigned j2_w,   j2_f;
    int unsigned j2_hidden;  // 1: MSB of j2 is always 1 and is not stored
    int unsigned c2_w,   c2_f;  // stored as -c2, unsigned
    int unsigned jxw_w,  jxw_f;
    int unsigned cxxw_w, cxxw_f;
    int unsigned s2p_w,  s2p_f;  // l2 + j2*xw
    int unsigned s2_w,   s2_f;   // s2p + (-c2)*xw^2
  } hps_fmt_t;

  function automatic hps_fmt_t hps_fmt(input int unsigned intervals);
    hps_fmt_t f;
    if (intervals == 512) begin
      f = '{idx_w: 9, xw_w: 7, xxw_w: 5, l2_w: 17, l2_f: 16, j2_w: 10, j2_f: 17,
            j2_hidden: 0, c2_w: 9, c2_f: 24, jxw_w: 9, jxw_f: 16, cxxw_w: 6,
            cxxw_f: 21, s2p_w: 17, s2p_f: 16, s2_w: 18, s2_f: 17};
    end else begin
      f = '{idx_w: 5, xw_w: 11, xxw_w: 12, l2_w: 18, l2_f: 17, j2_w: 14, j2_f: 17,
            j2_hidden: 1, c2_w: 9, c2_f: 16, jxw_w: 14, jxw_f: 17, cxxw_w: 11,
            cxxw_f: 18, s2p_w: 18, s2p_f: 17, s2_w: 18, s2_f: 17};
    end
    return f;
  endfunction

  // ---- elaboration-time coefficient arithmetic --------------------------
  localparam int unsigned QF = 40;  // fractional bits of intermediate values
  localparam int unsigned SP = 40;  // fractional bits of s = sqrt(3x+1)

  typedef logic signed [127:0] q128_t;

  function automatic logic [127:0] isqrt128(input logic [127:0] a);
    logic [127:0] r, b;
    r = '0;
    for (int k = 63; k >= 0; k--) begin
      b = r | (128'd1 << k);
      if (b * b <= a) r = b;
    end
    return r;
  endfunction

  // f_help(n/d) with QF fractional bits.
  function automatic q128_t fhelp_q(input int unsigned n, input int unsigned d);
    logic [127:0] s, den, num;
    s   = isqrt128(((128'(3 * n + d)) << (2 * SP)) / 128'(d));
    den = s * (s + (128'd2 << SP));
    num = 128'd3 << (QF + 2 * SP);
    return q128_t'((num + (den >> 1)) / den);
  endfunction

  // Round a QF-fractional value to f fractional bits (nearest, ties up).
  function automatic q128_t round_to(input q128_t a, input int unsigned f);
    q128_t half;
    half = q128_t'(128'd1 << (QF - f - 1));
    return (a + half) >>> (QF - f);
  endfunction

  function automatic q128_t coef_l2(input int unsigned i, input int unsigned intervals,
                                    input int unsigned f);
    return round_to(fhelp_q(2 * i, 2 * intervals), f);
  endfunction

  function automatic q128_t coef_c2_exact(input int unsigned i, input int unsigned intervals);
    q128_t l, e, m, k;
    l = fhelp_q(2 * i, 2 * intervals);
    m = fhelp_q(2 * i + 1, 2 * intervals);
    e = fhelp_q(2 * i + 2, 2 * intervals);
    k = e - l;
    return 4 * m - 4 * l - 2 * k;
  endfunction

  function automatic q128_t coef_j2(input int unsigned i, input int unsigned intervals,
                                    input int unsigned f);
    q128_t l, e, k;
    l = fhelp_q(2 * i, 2 * intervals);
    e = fhelp_q(2 * i + 2, 2 * intervals);
    k = e - l;
    return round_to(k + coef_c2_exact(i, intervals), f);
  endfunction

  // -c2, stored positive so that the datapath adds (-c2)*xw^2.
  function automatic q128_t coef_c2n(input int unsigned i, input int unsigned intervals,
                                     input int unsigned f);
    return round_to(-coef_c2_exact(i, intervals), f);
  endfunction

endpackage
