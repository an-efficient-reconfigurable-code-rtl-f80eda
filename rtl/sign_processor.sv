// sign_processor: sign part of a degree-8 check-node update. The product of all input
// signs is P = XOR of the 8 sign bits (7 XOR gates as a tree); each output sign is
// P XOR sign_i (8 more gates), which is the product of the signs of the other seven
// inputs: 15 XOR gates in all, as the design specifies. Sign 1 means negative.
// Purely combinational.
module sign_processor #(
  parameter int N = 8
) (
  input  logic [N-1:0] sin,
  output logic         prod,
  output logic [N-1:0] sout
);
  always_comb begin
    prod = ^sin;
    for (int i = 0; i < N; i++) sout[i] = prod ^ sin[i];
  end
endmodule
