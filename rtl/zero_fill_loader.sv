// zero_fill_loader: receive-side channel-LLR memory with zero filling. It holds one
// LLR per code bit of the mother code (J+I block columns of A LLRs). frame_start clears
// every entry to 0, the LLR of a bit about which nothing is known, so the parity vectors
// that were not transmitted (the punctured part of a daughter code) enter the decoder as
// erasures. Received segments arrive in transmission order; the k-th segment is written
// to the block column the transmitter used for it (p_1..p_J, then q_I, q_(I/2), ... in
// the order of rcrc_pkg::tx_parity), so the receiver needs no side information besides
// the segment count. Later segments (ARQ retransmissions) simply fill further columns.
// Setting untransmitted segments to LLR 0 follows the design; the memory organisation
// and the in-order mapping are this design's choice. Segments beyond J+I are dropped and
// flagged in overflow.
//
// Timing: a segment on seg_valid is visible at ch_llr from the next cycle. frame_start
// has priority over a segment in the same cycle.
module zero_fill_loader
  import rcrc_pkg::*;
#(
  parameter int A = RC_A,
  parameter int J = RC_J,
  parameter int I = RC_I
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frame_start,
  input  logic                      seg_valid,
  input  logic signed [LLR_W-1:0]   seg_llr [A],
  output logic signed [LLR_W-1:0]   ch_llr  [J+I][A],
  output logic [J+I-1:0]            received,
  output logic [$clog2(J+I+1)-1:0]  nseg,
  output logic                      overflow
);
  localparam int CB = $clog2(J + I);
  localparam int NB = $clog2(J + I + 1);
  localparam int II = $clog2(I);

  logic [CB-1:0] col;
  logic [CB-1:0] order [I];

  always_comb begin
    for (int m = 0; m < I; m++) order[m] = CB'(J + tx_parity(m, I) - 1);
    if (nseg < NB'(J)) col = CB'(nseg);
    else               col = order[II'(nseg - NB'(J))];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || frame_start) begin
      nseg     <= '0;
      overflow <= 1'b0;
      received <= '0;
      for (int c = 0; c < J + I; c++)
        for (int r = 0; r < A; r++) ch_llr[c][r] <= '0;
    end else if (seg_valid) begin
      if (nseg == NB'(J + I)) begin
        overflow <= 1'b1;
      end else begin
        ch_llr[col]   <= seg_llr;
        received[col] <= 1'b1;
        nseg          <= nseg + 1'b1;
      end
    end
  end
endmodule
