// phi_lut: the non-linear function of the sum-product check update,
//   phi(x) = -ln(tanh(x/2)),
// as a 7-bit in / 7-bit out look-up table. Input and output are unsigned 3.4 fixed point
// (4 fractional bits, 0 .. 7.9375), the table size the design calls for. Entry v holds
// round(16 * phi(v/16)) clipped to 127; entry 0 (phi = infinity) holds the largest code,
// 127. phi is its own inverse, so the same table serves the forward and the backward
// transform of the magnitude processor. The table is written as ranges of equal output.
// Purely combinational.
module phi_lut (
  input  logic [6:0] x,
  output logic [6:0] y
);
  always_comb begin
    case (x) inside
      7'd0: y = 7'd127;
      7'd1: y = 7'd55;
      7'd2: y = 7'd44;
      7'd3: y = 7'd38;
      7'd4: y = 7'd33;
      7'd5: y = 7'd30;
      7'd6: y = 7'd27;
      7'd7: y = 7'd25;
      7'd8: y = 7'd23;
      7'd9: y = 7'd21;
      7'd10: y = 7'd19;
      7'd11: y = 7'd18;
      7'd12: y = 7'd16;
      7'd13: y = 7'd15;
      7'd14: y = 7'd14;
      7'd15: y = 7'd13;
      [7'd16:7'd17]: y = 7'd12;
      7'd18: y = 7'd11;
      7'd19: y = 7'd10;
      [7'd20:7'd21]: y = 7'd9;
      [7'd22:7'd23]: y = 7'd8;
      [7'd24:7'd25]: y = 7'd7;
      [7'd26:7'd28]: y = 7'd6;
      [7'd29:7'd31]: y = 7'd5;
      [7'd32:7'd35]: y = 7'd4;
      [7'd36:7'd40]: y = 7'd3;
      [7'd41:7'd48]: y = 7'd2;
      [7'd49:7'd66]: y = 7'd1;
      [7'd67:7'd127]: y = 7'd0;
      default: y = 7'd0;
    endcase
  end
endmodule
