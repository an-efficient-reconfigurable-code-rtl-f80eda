// circ_shift: product of an a x a shifted identity matrix K(S) with a vector of a
// elements, each EW bits wide:
//   x = K(S) p,  x[r] = p[(r + S) mod a],
// i.e. p rotated left (towards element 0) by S places, as the encoder equations require.
// With EW = 1 it rotates a bit vector (encoder); with EW > 1 it rotates a vector of LLRs
// (decoder). Built as a logarithmic barrel rotator, one stage per bit of S; S must be
// below A. Element r occupies din[r*EW +: EW]. Purely combinational.
module circ_shift #(
  parameter int A  = rcrc_pkg::RC_A,
  parameter int EW = 1
) (
  input  logic [A*EW-1:0]      din,
  input  logic [$clog2(A)-1:0] shift,
  output logic [A*EW-1:0]      dout
);
  localparam int SB = $clog2(A);
  logic [A*EW-1:0] stage [SB+1];

  always_comb begin
    stage[0] = din;
    for (int s = 0; s < SB; s++) begin
      for (int r = 0; r < A; r++) begin
        if (shift[s]) stage[s+1][r*EW +: EW] = stage[s][((r + (1 << s)) % A)*EW +: EW];
        else          stage[s+1][r*EW +: EW] = stage[s][r*EW +: EW];
      end
    end
    dout = stage[SB];
  end
endmodule
