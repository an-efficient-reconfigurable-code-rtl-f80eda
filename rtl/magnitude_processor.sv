// magnitude_processor: magnitude part of a degree-8 sum-product check-node update,
//   y_j = phi( sum_{i != j} phi(|x_i|) ),
// with phi the 7-bit look-up table (3.4 fixed point). Each input goes through a phi
// table, the eight results are summed once, each output subtracts its own term from the
// total (so the "all but one" sums cost one adder tree and eight subtractors), the
// difference is clipped to 7 bits and goes through a second phi table.
// An input that is not connected to an edge should be driven with magnitude 127
// (phi = 0), which leaves the other outputs unchanged. Purely combinational.
module magnitude_processor #(
  parameter int N = 8
) (
  input  logic [6:0] xin  [N],
  output logic [6:0] yout [N]
);
  localparam int SW = 7 + $clog2(N);

  logic [6:0]    f   [N];
  logic [6:0]    e   [N];
  logic [SW-1:0] sum;
  logic [SW-1:0] ex  [N];

  for (genvar g = 0; g < N; g++) begin : g_in
    phi_lut u_phi_in (.x(xin[g]), .y(f[g]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += SW'(f[i]);
    for (int i = 0; i < N; i++) begin
      ex[i] = sum - SW'(f[i]);
      e[i]  = (ex[i] > SW'(127)) ? 7'd127 : ex[i][6:0];
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_out
    phi_lut u_phi_out (.x(e[g]), .y(yout[g]));
  end
endmodule
