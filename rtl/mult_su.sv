// mult_su: semi-generic array multiplier, unsigned x times y, where y is either
// two's complement (Y_SIGNED = 1) or unsigned (Y_SIGNED = 0).
//
// Each bit y[k] selects a partial-product row x AND y[k], weighted 2^k, and the
// rows are summed. For a signed y the row of its MSB has weight -2^(WY-1), so
// that row is built from the inverted x (sign-extended with ones) and the
// missing +1 of the two's-complement negation is injected as a carry-in equal
// to y[WY-1]: -x*y_msb = (~x + 1)*y_msb. That is the only difference from an
// unsigned array multiplier, which is why it is cheaper than a signed-by-signed
// multiplier. This structure follows the reference design; x must never be
// negative. Purely combinational; p is WX+WY bits, two's complement when
// Y_SIGNED = 1.
module mult_su #(
  parameter int unsigned WX       = 4,
  parameter int unsigned WY       = 4,
  parameter bit          Y_SIGNED = 1'b1
) (
  input  logic [WX-1:0]    x,
  input  logic [WY-1:0]    y,
  output logic [WX+WY-1:0] p
);
  localparam int unsigned WP = WX + WY;

  logic [WP-1:0] x_ext;
  assign x_ext = WP'(x);

  always_comb begin
    logic [WP-1:0] acc;
    acc = '0;
    for (int k = 0; k < int'(WY) - 1; k++) begin
      acc = acc + ((x_ext & {WP{y[k]}}) << k);
    end
    if (Y_SIGNED) begin
      // Negated last row: inverted x gated by the sign bit, carry-in = sign bit.
      acc = acc + ((~x_ext & {WP{y[WY-1]}}) << (WY - 1))
                + (WP'(y[WY-1]) << (WY - 1));
    end else begin
      acc = acc + ((x_ext & {WP{y[WY-1]}}) << (WY - 1));
    end
    p = acc;
  end
endmodule
