// hps_lut: coefficient look-up table of the second sub-function s2.
//
// For each of the INTERVALS equal intervals of x it holds the three constants
// of s2_i(xw) = l2 + j2*xw + (-c2)*xw^2: l2 (unsigned), j2 = k2 + c2 (two's
// complement; always negative) and -c2 (stored with its sign flipped, so it is
// positive and the datapath adds instead of subtracting). With 32 intervals the
// MSB of j2 is always 1 and is not stored; the output re-attaches it.
//
// Two tables are available, both computed at elaboration, so no data file is
// needed:
//  * TUNED = 0: the plain interpolation constants, from the rule that the s2
//    polynomial meets f_help at the start, middle and end of each interval
//    (see hps_pkg), rounded to nearest.
//  * TUNED = 1 (default): the same constants plus a per-interval correction of
//    up to 127 LSBs (hps_tune_pkg) that brings the mean error of z over the
//    interval close to zero while the maximum error stays below 2^-15. The
//    selection rule follows the reference design; its own tuned values are not
//    published, so the corrections are this design's.
// In both tables l2 of interval 0 is exactly 1, which makes z = 1 exact for
// v = 1. The table is a constant ROM read combinationally by the interval index.
module hps_lut
  import hps_pkg::*;
#(
  parameter  int unsigned INTERVALS = 32,
  parameter  bit          TUNED     = 1'b1,
  localparam hps_fmt_t    FMT       = hps_fmt(INTERVALS)
) (
  input  logic [FMT.idx_w-1:0]       idx,
  output logic [FMT.l2_w-1:0]        l2,
  output logic signed [FMT.j2_w-1:0] j2,
  output logic [FMT.c2_w-1:0]        c2n
);
  localparam int unsigned JS_W = FMT.j2_w - FMT.j2_hidden;  // stored j2 bits

  localparam int unsigned ROW_W = FMT.l2_w + JS_W + FMT.c2_w;

  logic [ROW_W-1:0] rom [INTERVALS];

  for (genvar i = 0; i < int'(INTERVALS); i++) begin : g_rom
    localparam q128_t L = coef_l2(i, INTERVALS, FMT.l2_f)
                        + (TUNED ? q128_t'(hps_tune_pkg::delta(INTERVALS, 0, i)) : q128_t'(0));
    localparam q128_t J = coef_j2(i, INTERVALS, FMT.j2_f)
                        + (TUNED ? q128_t'(hps_tune_pkg::delta(INTERVALS, 1, i)) : q128_t'(0));
    localparam q128_t C = coef_c2n(i, INTERVALS, FMT.c2_f)
                        + (TUNED ? q128_t'(hps_tune_pkg::delta(INTERVALS, 2, i)) : q128_t'(0));
    assign rom[i] = {L[FMT.l2_w-1:0], J[JS_W-1:0], C[FMT.c2_w-1:0]};
  end

  logic [ROW_W-1:0]    row;
  logic [JS_W-1:0]     j2s;
  assign row = rom[idx];
  assign {l2, j2s, c2n} = row;

  if (FMT.j2_hidden != 0) begin : g_hidden
    assign j2 = {1'b1, j2s};
  end else begin : g_full
    assign j2 = j2s;
  end

  initial begin
    assert (INTERVALS == 32 || INTERVALS == 512)
      else $error("hps_lut: formats are defined for 32 and 512 intervals only");
  end
endmodule
