// s_to_u: signed-to-unsigned converter of the row-column processor. Splits a two's
// complement value into its sign and its magnitude, saturating the magnitude to the
// OUT_W-bit range of the phi table (the most negative input also saturates).
// The converter is named by the design; its saturating behaviour is this design's choice.
// Purely combinational.
module s_to_u #(
  parameter int IN_W  = 11,
  parameter int OUT_W = 7
) (
  input  logic signed [IN_W-1:0] x,
  output logic                   sign,
  output logic [OUT_W-1:0]       mag
);
  logic [IN_W-1:0] absx;
  always_comb begin
    sign = x[IN_W-1];
    absx = sign ? IN_W'(-x) : IN_W'(x);
    if (absx > IN_W'((1 << OUT_W) - 1) || (sign && absx[IN_W-1]))
      mag = '1;
    else
      mag = absx[OUT_W-1:0];
  end
endmodule
