// rc_decoder: universal layered sum-product decoder for the mother code and every
// daughter code. A daughter code is decoded on the full mother matrix: its untransmitted
// parity bits simply have channel LLR 0 (zero filling, done by zero_fill_loader).
//
// Schedule: each iteration visits the block rows from the bottom one (I) to the top one
// (1). A block row has A parity checks; P junction row-column processors work on P of
// them at a time, so a block row takes A/P cycles (2 with A = 72, P = 36) and an
// iteration I*A/P cycles plus one cycle for the syndrome check. Each processor reads the
// a-posteriori LLRs Z of its (up to 8) bits, removes its old row message, forms the new
// row messages and writes Z' = x + y' back, so later block rows in the same iteration
// already see the update (layered decoding).
//
// Data path: Z is held per block column as one A-LLR word. For each of the 8 edges of the
// current block row the column word is read and rotated by the circulant's shift
// (circ_shift), so lane r of the rotated word is the bit checked by row r. In the first
// A/P-1 cycles of a block row the processed lanes go back into an edge register; in the
// last cycle the completed word is rotated back and written to its column. Because every
// circulant is a permutation, the rows of one block row never share a bit within one
// block column, so no two lanes collide. Row messages are kept per (block row, cycle)
// as one wide word; in the first iteration they read as zero, so nothing has to be
// cleared.
//
// Stopping: after each iteration the hard decisions (sign of Z, negative = 1) are checked
// against all parity checks; decoding ends when they form a codeword or after MAX_ITER
// iterations. The layered schedule, bottom-to-top order, degree-8 processors, P = 36,
// A = 72 and the 50-iteration limit follow the design; the memory organisation, the
// rotate/write-back scheme and the handshake are this design's own.
//
// Interface: start (while not busy) copies the channel LLRs into Z and begins. done
// pulses for one cycle at the end, with success (codeword found), iters (iterations
// run) and dec_bits (hard decisions of the systematic vectors p_1..p_J) valid from then
// until the next start.
module rc_decoder
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
  input  logic                     start,
  input  logic signed [LLR_W-1:0]  ch_llr [J+I][A],
  output logic                     busy,
  output logic                     done,
  output logic                     success,
  output logic [7:0]               iters,
  output logic [A-1:0]             dec_bits [J]
);
  localparam int NH = A / P;           // cycles per block row
  localparam int SB = $clog2(A);
  localparam int CB = $clog2(J + I);
  localparam int RB = $clog2(I);
  localparam int HB = (NH > 1) ? $clog2(NH) : 1;
  localparam int AB = $clog2(I * NH);

  typedef msg_t [P-1:0][DEG-1:0] yword_t;
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CHECK} state_t;

  state_t           state;
  logic [RB-1:0]    br;                // current block row (0-based)
  logic [HB-1:0]    h;                 // cycle within the block row
  logic [A*ZW-1:0]  zc   [J+I];        // a-posteriori LLRs, one word per block column
  yword_t           ymem [I*NH];       // row messages
  logic [A*ZW-1:0]  wreg [DEG];        // partly processed rotated words

  logic [CB-1:0]    col  [DEG];
  logic [SB-1:0]    sh   [DEG];
  logic [SB-1:0]    ush  [DEG];
  logic [DEG-1:0]   act;
  logic [A*ZW-1:0]  rot  [DEG];
  logic [A*ZW-1:0]  src  [DEG];
  logic [A*ZW-1:0]  upd  [DEG];
  logic [A*ZW-1:0]  back [DEG];
  logic [AB-1:0]    addr;
  yword_t           yrd;
  yword_t           ywr;

  logic signed [ZW-1:0] lz_in  [P][DEG];
  logic signed [ZW-1:0] lz_out [P][DEG];
  msg_t                 ly_old [P][DEG];
  msg_t                 ly_new [P][DEG];

  logic [A-1:0]     hd [J+I];
  logic [I-1:0]     row_fail;
  logic             synd_ok;

  initial assert (A % P == 0) else $error("A must be a multiple of P");

  // Edges of the current block row: six systematic circulants, then q_i and q_(i-1).
  always_comb begin
    for (int e = 0; e < SYS_DEG; e++) begin
      col[e] = '0;
      sh[e]  = '0;
      for (int i = 0; i < I; i++) begin
        if (int'(br) == i) begin
          col[e] = CB'(sys_col(i, e, J));
          sh[e]  = SB'(sys_shift(i, e, A));
        end
      end
      act[e] = 1'b1;
    end
    col[SYS_DEG]     = CB'(J + int'(br));
    sh[SYS_DEG]      = '0;
    act[SYS_DEG]     = 1'b1;
    col[SYS_DEG + 1] = CB'(J + int'(br) - 1);
    sh[SYS_DEG + 1]  = '0;
    act[SYS_DEG + 1] = (br != '0);
    for (int e = 0; e < DEG; e++) ush[e] = (sh[e] == '0) ? '0 : SB'(A - int'(sh[e]));
  end

  for (genvar e = 0; e < DEG; e++) begin : g_edge
    circ_shift #(.A(A), .EW(ZW)) u_rot  (.din(zc[col[e]]), .shift(sh[e]),  .dout(rot[e]));
    circ_shift #(.A(A), .EW(ZW)) u_back (.din(upd[e]),     .shift(ush[e]), .dout(back[e]));
  end

  assign addr = AB'(int'(br) * NH + int'(h));
  assign yrd  = ymem[addr];

  // Lane r = h*P + t of every edge word goes to processor t.
  always_comb begin
    for (int e = 0; e < DEG; e++) src[e] = (h == '0) ? rot[e] : wreg[e];
    for (int t = 0; t < P; t++) begin
      for (int e = 0; e < DEG; e++) begin
        lz_in[t][e]  = src[e][(int'(h) * P + t) * ZW +: ZW];
        ly_old[t][e] = (iters == '0) ? '0 : yrd[t][e];
      end
    end
  end

  // Processed lanes back into the edge words, new row messages into the message word.
  always_comb begin
    for (int e = 0; e < DEG; e++) upd[e] = src[e];
    for (int t = 0; t < P; t++) begin
      for (int e = 0; e < DEG; e++) begin
        upd[e][(int'(h) * P + t) * ZW +: ZW] = lz_out[t][e];
        ywr[t][e] = ly_new[t][e];
      end
    end
  end

  for (genvar t = 0; t < P; t++) begin : g_lane
    row_column_processor #(.N(DEG)) u_rcp (
      .act(act), .z_in(lz_in[t]), .y_old(ly_old[t]),
      .z_out(lz_out[t]), .y_new(ly_new[t])
    );
  end

  always_comb begin
    for (int c = 0; c < J + I; c++)
      for (int r = 0; r < A; r++) hd[c][r] = zc[c][r * ZW + ZW - 1];
  end

  syndrome_check #(.A(A), .J(J), .I(I)) u_synd (.hd(hd), .row_fail(row_fail), .ok(synd_ok));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      br      <= '0;
      h       <= '0;
      iters   <= '0;
      done    <= 1'b0;
      success <= 1'b0;
      for (int j = 0; j < J; j++) dec_bits[j] <= '0;
      for (int c = 0; c < J + I; c++) zc[c] <= '0;
      for (int e = 0; e < DEG; e++) wreg[e] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            for (int c = 0; c < J + I; c++)
              for (int r = 0; r < A; r++) zc[c][r * ZW +: ZW] <= ZW'(ch_llr[c][r]);
            br    <= RB'(I - 1);
            h     <= '0;
            iters <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          ymem[addr] <= ywr;
          if (int'(h) == NH - 1) begin
            for (int e = 0; e < DEG; e++)
              if (act[e]) zc[col[e]] <= back[e];
            h <= '0;
            if (br == '0) begin
              iters <= iters + 1'b1;
              state <= S_CHECK;
            end else begin
              br <= br - 1'b1;
            end
          end else begin
            for (int e = 0; e < DEG; e++) wreg[e] <= upd[e];
            h <= h + 1'b1;
          end
        end
        default: begin // S_CHECK
          if (synd_ok || int'(iters) >= MAX_ITER) begin
            done    <= 1'b1;
            success <= synd_ok;
            for (int j = 0; j < J; j++) dec_bits[j] <= hd[j];
            state   <= S_IDLE;
          end else begin
            br    <= RB'(I - 1);
            state <= S_RUN;
          end
        end
      endcase
    end
  end
endmodule
