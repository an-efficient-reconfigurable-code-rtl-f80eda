// tx_controller: transmission (puncturing / incremental-redundancy) controller of the
// rate-compatible code. It buffers one frame - the J systematic vectors as they enter the
// encoder and the I parity vectors the encoder returns - and sends it as a stream of
// A-bit segments:
//   first  p_1 .. p_J and then q_I              (highest rate, J/(J+1));
//   then, one per more_req pulse (an ARQ retransmission request), the remaining parity
//   vectors in the order q_(I/2), q_(I/4), q_(3I/4), the other even-indexed q in
//   ascending order, and last the odd-indexed q in ascending order.
// Every parity vector sent lowers the rate to J/(J + n_sent), down to the mother-code
// rate J/(J+I) = 1/2. The order and the choice of q_I as the first parity vector follow
// the design; the buffer, the request handshake and the segment tags are this design's
// own. A request that arrives while a segment is being sent, or after all parity vectors
// have gone, is ignored (all_sent tells the requester).
//
// Interface: cap_valid/cap_vec snoop the systematic vectors accepted by the encoder,
// par_valid/parity take the encoder's result. ready is low while a full frame waits to
// be sent or is being sent (the encoder input must be held). Output segments come one
// per cycle on seg_valid/seg_data, tagged with their block column (0..J-1 systematic,
// J+i-1 for q_i) and their sequence number. npar_sent counts parity vectors sent.
module tx_controller
  import rcrc_pkg::*;
#(
  parameter int A = RC_A,
  parameter int J = RC_J,
  parameter int I = RC_I
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cap_valid,
  input  logic [A-1:0]             cap_vec,
  input  logic                     par_valid,
  input  logic [A-1:0]             parity [I],
  input  logic                     more_req,
  output logic                     ready,
  output logic                     seg_valid,
  output logic [A-1:0]             seg_data,
  output logic [$clog2(J+I)-1:0]   seg_col,
  output logic [$clog2(J+I+1)-1:0] seg_num,
  output logic [$clog2(I+1)-1:0]   npar_sent,
  output logic                     all_sent
);
  localparam int CB = $clog2(J + I);
  localparam int NB = $clog2(J + I + 1);
  localparam int PB = $clog2(I + 1);
  localparam int JB = $clog2(J + 1);
  localparam int JI = $clog2(J);
  localparam int II = $clog2(I);

  typedef enum logic [1:0] {S_COLLECT, S_SEND, S_WAIT} state_t;

  state_t        state;
  logic [A-1:0]  sys_buf [J];
  logic [A-1:0]  par_buf [I];
  logic [JB-1:0] nsys;      // systematic vectors captured
  logic [NB-1:0] k;         // next segment number
  logic [CB-1:0] order [I]; // block column of the m-th parity vector sent
  logic [II-1:0] m_idx;     // rank of the next parity vector in the order
  logic [II-1:0] p_idx;     // its index in par_buf (q_(p_idx+1))

  always_comb begin
    for (int m = 0; m < I; m++) order[m] = CB'(J + tx_parity(m, I) - 1);
  end

  assign m_idx = II'(k - NB'(J));
  assign p_idx = II'(order[m_idx] - CB'(J));

  assign ready    = (state != S_SEND) && (nsys != JB'(J));
  assign all_sent = (k == NB'(J + I));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      nsys      <= '0;
      k         <= '0;
      seg_valid <= 1'b0;
      seg_data  <= '0;
      seg_col   <= '0;
      seg_num   <= '0;
      npar_sent <= '0;
      for (int j = 0; j < J; j++) sys_buf[j] <= '0;
      for (int i = 0; i < I; i++) par_buf[i] <= '0;
    end else begin
      seg_valid <= 1'b0;
      if (cap_valid && ready) begin
        sys_buf[nsys[JI-1:0]] <= cap_vec;
        nsys          <= nsys + 1'b1;
        state         <= S_COLLECT;
      end
      case (state)
        S_COLLECT: begin
          if (par_valid) begin
            par_buf   <= parity;
            nsys      <= '0;
            k         <= '0;
            npar_sent <= '0;
            state     <= S_SEND;
          end
        end
        S_SEND: begin
          seg_valid <= 1'b1;
          seg_num   <= k;
          k         <= k + 1'b1;
          if (k < NB'(J)) begin
            seg_data <= sys_buf[k[JI-1:0]];
            seg_col  <= CB'(k);
          end else begin
            seg_data  <= par_buf[I-1];
            seg_col   <= order[0];
            npar_sent <= PB'(1);
            state     <= S_WAIT;
          end
        end
        default: begin // S_WAIT: one more parity vector per request
          if (more_req && !all_sent && !(cap_valid && ready)) begin
            seg_valid <= 1'b1;
            seg_num   <= k;
            k         <= k + 1'b1;
            seg_data  <= par_buf[p_idx];
            seg_col   <= order[m_idx];
            npar_sent <= npar_sent + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
