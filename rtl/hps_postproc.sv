// hps_postproc: post-processing z = f_post(y) = (y + 1)/2, mapping the HPS
// result y in (0,1] back to 1/sqrt(v) in (0.5,1].
//
// y is unsigned with one integral bit and 15 fractional bits. Adding the
// integer 1 changes only the integral part: the 2^1 bit of y+1 equals y[15]
// and the 2^0 bit equals ~y[15]; the fraction passes unchanged. The division by
// two costs nothing: the same bits are re-read with the MSB worth 2^0, giving z
// with 16 fractional bits. This follows the reference design. Combinational.
module hps_postproc
  import hps_pkg::*;
(
  input  logic [Y_W-1:0] y,   // Q1.15, 0 < y <= 1
  output logic [Z_W-1:0] z    // Q1.16, z = (y+1)/2
);
  assign z = {y[Y_W-1], ~y[Y_W-1], y[Y_W-2:0]};
endmodule
