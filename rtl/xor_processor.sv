// xor_processor: one of the encoder's bank of XOR processors. It accumulates, bit by bit,
// the rotated systematic vectors x_(i,j) of one block row while p_1..p_J stream in:
//   s_i(k) = XOR_j x_(i,j)(k),  k = 1..a.
// 'first' marks the first vector of a frame (the accumulator is loaded, not XORed) and
// 'en' marks a vector that belongs to this block row (a null circulant contributes a zero
// vector, so the register simply holds). 'sum_next' is the value the register takes at
// the next clock edge, so the encoder can finish the parity one cycle earlier.
// Clocked on the rising edge, active-low synchronous reset.
module xor_processor #(
  parameter int A = rcrc_pkg::RC_A
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic         first,
  input  logic         en,
  input  logic [A-1:0] x,
  output logic [A-1:0] sum,
  output logic [A-1:0] sum_next
);
  always_comb begin
    sum_next = sum;
    if (valid) begin
      if (first) sum_next = en ? x : '0;
      else if (en) sum_next = sum ^ x;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sum <= '0;
    else        sum <= sum_next;
  end
endmodule
