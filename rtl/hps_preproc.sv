// hps_preproc: pre-processing x = f_pre(v) = (v - 1)/3, mapping v in [1,4) onto
// the HPS working range x in [0,1).
//
// v is unsigned Q2.13 (15 bits). Because v >= 1 and the subtrahend is an
// integer, v - 1 leaves the 13 fractional bits alone and only rewrites the two
// integral bits, with one AND gate and one inverter:
//     out[1] = v[14] & v[13],   out[0] = ~v[13]
// (the code 00 never occurs). The difference is then multiplied by the constant
// 1/3, truncated to 14 bits (binary 0.0101...01), in the semi-generic
// multiplier with an unsigned second operand, and the product is truncated to
// the 16 fractional bits of x. The gate-level subtraction and the constant
// multiplier follow the reference design; the bit alignment of the 1/3
// constant is this design's reading of its 14-bit width. Combinational.
module hps_preproc
  import hps_pkg::*;
(
  input  logic [V_W-1:0] v,   // Q2.13, 1 <= v < 4
  output logic [X_W-1:0] x    // Q0.16, x = (v-1)/3 truncated
);
  logic [V_W-1:0]     x_proto;   // v - 1, Q2.13
  logic [V_W+T_W-1:0] prod;      // Q?.28

  assign x_proto = {v[V_W-1] & v[V_W-2], ~v[V_W-2], v[V_W-3:0]};

  mult_su #(.WX(V_W), .WY(T_W), .Y_SIGNED(1'b0)) u_third (
    .x(x_proto), .y(ONE_THIRD), .p(prod)
  );

  // Product has V_F + T_F = 28 fractional bits and is below 1.
  assign x = prod[V_F+T_F-1 -: X_W];
endmodule
