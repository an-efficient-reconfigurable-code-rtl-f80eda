// rcrc_ldpc_codec: rate-compatible QC-LDPC encoder/decoder pair. One encoder and one
// decoder, built for the rate-1/2 mother code, serve every daughter code from
// J/(J+1) (p plus q_I only) down to 1/2 (all parity vectors).
//
// Transmit side: rc_encoder turns J systematic vectors into the I parity vectors;
// tx_controller sends p_1..p_J and q_I, and one further parity vector per ARQ request
// (more_req). Receive side: zero_fill_loader keeps the channel LLRs of the received
// segments and 0 for the others; rc_decoder decodes on the full mother matrix when
// dec_start is raised. The modulator and channel between seg_* and rx_* lie outside this
// block: the receive side expects one A-LLR segment per rx_valid, in the order the
// transmit side sent them, and rx_frame_start before the first segment of a frame.
//
// The two halves share nothing but parameters, so a frame can be encoded while another
// is decoded. All ports are synchronous to clk; rst_n is an active-low synchronous reset.
module rcrc_ldpc_codec
  import rcrc_pkg::*;
#(
  parameter int A        = RC_A,
  parameter int J        = RC_J,
  parameter int I        = RC_I,
  parameter int P        = DEC_PAR,
  parameter int MAX_ITER = 50
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // systematic input
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [A-1:0]             in_vec,
  // transmitted segments
  input  logic                     more_req,
  output logic                     seg_valid,
  output logic [A-1:0]             seg_data,
  output logic [$clog2(J+I)-1:0]   seg_col,
  output logic [$clog2(J+I+1)-1:0] seg_num,
  output logic [$clog2(I+1)-1:0]   npar_sent,
  output logic                     tx_all_sent,
  // received segments
  input  logic                     rx_frame_start,
  input  logic                     rx_valid,
  input  logic signed [LLR_W-1:0]  rx_llr [A],
  output logic [$clog2(J+I+1)-1:0] rx_nseg,
  output logic [J+I-1:0]           rx_received,
  output logic                     rx_overflow,
  // decoder
  input  logic                     dec_start,
  output logic                     dec_busy,
  output logic                     dec_done,
  output logic                     dec_success,
  output logic [7:0]               dec_iters,
  output logic [A-1:0]             dec_bits [J]
);
  logic               enc_valid;
  logic [A-1:0]       enc_parity [I];
  logic signed [LLR_W-1:0] ch_llr [J+I][A];

  rc_encoder #(.A(A), .J(J), .I(I)) u_enc (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_vec(in_vec),
    .out_valid(enc_valid), .parity(enc_parity)
  );

  tx_controller #(.A(A), .J(J), .I(I)) u_tx (
    .clk(clk), .rst_n(rst_n), .cap_valid(in_valid), .cap_vec(in_vec),
    .par_valid(enc_valid), .parity(enc_parity), .more_req(more_req), .ready(in_ready),
    .seg_valid(seg_valid), .seg_data(seg_data), .seg_col(seg_col), .seg_num(seg_num),
    .npar_sent(npar_sent), .all_sent(tx_all_sent)
  );

  zero_fill_loader #(.A(A), .J(J), .I(I)) u_rx (
    .clk(clk), .rst_n(rst_n), .frame_start(rx_frame_start), .seg_valid(rx_valid),
    .seg_llr(rx_llr), .ch_llr(ch_llr), .received(rx_received), .nseg(rx_nseg),
    .overflow(rx_overflow)
  );

  rc_decoder #(.A(A), .J(J), .I(I), .P(P), .MAX_ITER(MAX_ITER)) u_dec (
    .clk(clk), .rst_n(rst_n), .start(dec_start), .ch_llr(ch_llr), .busy(dec_busy),
    .done(dec_done), .success(dec_success), .iters(dec_iters), .dec_bits(dec_bits)
  );
endmodule
