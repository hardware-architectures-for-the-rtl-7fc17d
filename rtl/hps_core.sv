// hps_core: the HPS processing block, y = s1(x) * s2(x) ~ f_org(x) =
// 2/sqrt(3x+1) - 1 for x in [0,1).
//
// With c1 = 0 the first sub-function is s1 = 1 - x, a plain two's-complement
// negation of x with an extra integral bit. The second sub-function is a
// piecewise second-order polynomial: the top log2(I) bits of x are the interval
// index xi, the remaining bits are the position xw in the interval, and
//     s2 = l2 + j2*xw + (-c2)*xw^2
// with the three coefficients read from hps_lut. xw^2 comes from a squarer;
// j2*xw uses the semi-generic multiplier with a signed second operand; (-c2)*xw^2
// and s1*s2 use it with unsigned operands. Each path is truncated to the width
// of the reference implementation (hps_pkg formats): s2p = l2 + j2*xw, then
// s2 = s2p + (-c2)*xw^2, then y = s1*s2 truncated to 15 fractional bits.
// TUNED selects the tuned (default) or the computed coefficient table of
// hps_lut. Combinational; interface is x (Q0.16) in, y (Q1.15) out.
module hps_core
  import hps_pkg::*;
#(
  parameter  int unsigned INTERVALS = 32,
  parameter  bit          TUNED     = 1'b1,
  localparam hps_fmt_t    FMT       = hps_fmt(INTERVALS)
) (
  input  logic [X_W-1:0] x,
  output logic [Y_W-1:0] y
);
  // ---- interval split and s1 ---------------------------------------------
  logic [FMT.idx_w-1:0] xi;
  logic [FMT.xw_w-1:0]  xw;
  logic [S1_W-1:0]      s1;

  assign xi = x[X_W-1 -: FMT.idx_w];
  assign xw = x[FMT.xw_w-1:0];
  assign s1 = S1_W'(1 << X_F) - S1_W'(x);

  // ---- coefficients ------------------------------------------------------
  logic [FMT.l2_w-1:0]        l2;
  logic signed [FMT.j2_w-1:0] j2;
  logic [FMT.c2_w-1:0]        c2n;

  hps_lut #(.INTERVALS(INTERVALS), .TUNED(TUNED)) u_lut (.idx(xi), .l2(l2), .j2(j2), .c2n(c2n));

  // ---- xw^2 --------------------------------------------------------------
  logic [2*FMT.xw_w-1:0] xw_sq;
  logic [FMT.xxw_w-1:0]  xxw;

  squarer #(.W(FMT.xw_w)) u_sq (.a(xw), .p(xw_sq));
  assign xxw = xw_sq[2*FMT.xw_w-1 -: FMT.xxw_w];

  // ---- j2*xw (signed) ----------------------------------------------------
  localparam int unsigned JP_W = FMT.xw_w + FMT.j2_w;
  localparam int unsigned JP_F = FMT.xw_w + FMT.j2_f;
  logic signed [JP_W-1:0]       jp;
  logic signed [FMT.jxw_w-1:0]  jxw;

  mult_su #(.WX(FMT.xw_w), .WY(FMT.j2_w), .Y_SIGNED(1'b1)) u_jmul (
    .x(xw), .y(j2), .p(jp)
  );
  assign jxw = jp[JP_F-FMT.jxw_f +: FMT.jxw_w];

  // ---- (-c2)*xw^2 (unsigned) ---------------------------------------------
  localparam int unsigned CP_W = FMT.xxw_w + FMT.c2_w;
  localparam int unsigned CP_F = FMT.xxw_w + FMT.c2_f;
  logic [CP_W-1:0]         cp;
  logic [FMT.cxxw_w-1:0]   cxxw;

  mult_su #(.WX(FMT.xxw_w), .WY(FMT.c2_w), .Y_SIGNED(1'b0)) u_cmul (
    .x(xxw), .y(c2n), .p(cp)
  );
  assign cxxw = cp[CP_F-FMT.cxxw_f +: FMT.cxxw_w];

  // ---- s2 = l2 + j2*xw + (-c2)*xw^2 --------------------------------------
  localparam int unsigned AW = 40;  // wide enough for every aligned term
  logic signed [AW-1:0] l2_a, jxw_a, s2p_a, cxxw_a, s2_a;
  logic [FMT.s2p_w-1:0] s2p;
  logic [FMT.s2_w-1:0]  s2;

  assign l2_a   = AW'(l2) <<< (FMT.s2p_f - FMT.l2_f);
  assign jxw_a  = AW'(jxw) <<< (FMT.s2p_f - FMT.jxw_f);
  assign s2p_a  = l2_a + jxw_a;
  assign s2p    = s2p_a[FMT.s2p_w-1:0];

  assign cxxw_a = AW'(cxxw);
  assign s2_a   = (AW'(s2p) <<< (FMT.cxxw_f - FMT.s2p_f)) + cxxw_a;
  assign s2     = s2_a[FMT.cxxw_f-FMT.s2_f +: FMT.s2_w];

  // ---- y = s1 * s2 -------------------------------------------------------
  localparam int unsigned YP_W = S1_W + FMT.s2_w;
  localparam int unsigned YP_F = X_F + FMT.s2_f;
  logic [YP_W-1:0] yp;

  mult_su #(.WX(S1_W), .WY(FMT.s2_w), .Y_SIGNED(1'b0)) u_ymul (
    .x(s1), .y(s2), .p(yp)
  );
  assign y = yp[YP_F-Y_F +: Y_W];
endmodule
