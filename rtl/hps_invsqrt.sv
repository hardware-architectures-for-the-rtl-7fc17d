// hps_invsqrt: inverse square root z = 1/sqrt(v) and inverse zz = 1/v of a
// fixed-point v in [1,4), by Harmonized Parabolic Synthesis (HPS).
//
// The range [1,4) is the one a floating-point front end needs: rewriting the
// exponent in base four leaves a significand in [1,4) and a result exponent of
// -d. The datapath is a chain of combinational blocks:
//     v -> hps_preproc  x = (v-1)/3
//       -> hps_core     y = s1(x)*s2(x) ~ 2/sqrt(3x+1) - 1
//       -> hps_postproc z = (y+1)/2
//       -> squarer      zz = z^2
// The whole chain is one combinational stage; z and zz are registered at the
// output, so a result appears one clock after v is applied (the source of v is
// expected to be a register). This output-register arrangement follows the
// reference design; the asynchronous active-low reset, which clears both
// outputs, is this design's own addition.
//
// Parameters: INTERVALS (32 or 512) sets the number of s2 intervals and the
// data-path widths; TUNED selects the tuned coefficient table (default) or the
// one computed from the interpolation rule alone.
//
// Ports: v is Q2.13 (15 bits), z is Q1.16 (17 bits), zz is Q1.17 (18 bits).
// z is within 2^-15 of 1/sqrt(v) for every v and exactly 1 for v = 1; zz is
// z^2 truncated and carries no accuracy target of its own.
module hps_invsqrt
  import hps_pkg::*;
#(
  parameter int unsigned INTERVALS = 32,
  parameter bit          TUNED     = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [V_W-1:0]  v,
  output logic [Z_W-1:0]  z,
  output logic [ZZ_W-1:0] zz
);
  logic [X_W-1:0]    x;
  logic [Y_W-1:0]    y;
  logic [Z_W-1:0]    z_c;
  logic [2*Z_W-1:0]  zsq;
  logic [ZZ_W-1:0]   zz_c;

  hps_preproc                       u_pre  (.v(v), .x(x));
  hps_core #(.INTERVALS(INTERVALS), .TUNED(TUNED)) u_core (.x(x), .y(y));
  hps_postproc                      u_post (.y(y), .z(z_c));
  squarer #(.W(Z_W))                u_inv  (.a(z_c), .p(zsq));

  // z^2 has 2*Z_F = 32 fractional bits; keep ZZ_F of them.
  assign zz_c = zsq[2*Z_F-ZZ_F +: ZZ_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z  <= '0;
      zz <= '0;
    end else begin
      z  <= z_c;
      zz <= zz_c;
    end
  end
endmodule
