// u_to_s: unsigned-to-signed converter of the row-column processor. Turns a sign bit and
// an unsigned magnitude into a two's complement value one bit wider than the magnitude.
// Sign 1 means negative. Named by the design; the encoding is this design's choice.
// Purely combinational.
module u_to_s #(
  parameter int W = 7
) (
  input  logic               sign,
  input  logic [W-1:0]       mag,
  output logic signed [W:0]  y
);
  always_comb y = sign ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
endmodule
