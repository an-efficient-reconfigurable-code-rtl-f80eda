// rc_encoder: universal encoder of the rate-compatible QC-LDPC mother code. One encoder
// serves every code rate: it always computes all I parity vectors of the mother code,
// and the transmission controller decides how many of them are sent.
//
// Because every circulant m_(i,j) is a shifted identity or zero, m_(i,j) p_j is a
// rotation of p_j (circ_shift). The systematic vectors p_1..p_J arrive one per cycle
// (A bits each). A bank of I XOR processors, one per block row, works in parallel: in
// each cycle every block row whose circulant in the current block column is non-null
// rotates p_j by its shift value and XORs it into its accumulator. After the J-th
// vector the block-row sums s'_i = sum_j m_(i,j) p_j are complete and the dual-diagonal
// parity part gives
//   q_1 = s'_1,   q_i = s'_i + q_(i-1)   (a prefix XOR over the block rows),
// which is evaluated when the last vector is taken, as a prefix-XOR tree of depth
// log2(I) rather than a chain of I XORs, to keep the path from input to output short.
//
// Interface: in_valid/in_vec deliver p_1..p_J in order; in_ready is a plain enable from
// the consumer side (the encoder only counts accepted vectors). One cycle after the
// J-th vector is accepted, out_valid pulses for one cycle and parity[i-1] holds q_i
// until the next frame completes. Frames can follow back to back: throughput A
// information bits per cycle, latency J + 1 cycles.
// The block-row-parallel organisation and the accumulation order are this design's
// reading of the encoder description; the per-cycle input of one systematic vector is
// its own choice.
module rc_encoder
  import rcrc_pkg::*;
#(
  parameter int A = RC_A,
  parameter int J = RC_J,
  parameter int I = RC_I
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_ready,
  input  logic [A-1:0] in_vec,
  output logic         out_valid,
  output logic [A-1:0] parity [I]
);
  localparam int SB = $clog2(A);
  localparam int JB = (J > 1) ? $clog2(J) : 1;

  logic [JB-1:0] jcnt;
  logic          take;
  logic          last;
  logic          en_row  [I];
  logic [SB-1:0] sh_row  [I];
  logic [A-1:0]  x_row   [I];
  logic [A-1:0]  acc     [I];
  logic [A-1:0]  acc_nxt [I];
  logic [A-1:0]  q_nxt   [I];

  assign take = in_valid && in_ready;
  assign last = take && (jcnt == JB'(J - 1));

  // Which block rows have a non-null circulant in the current block column, and its shift.
  always_comb begin
    for (int i = 0; i < I; i++) begin
      en_row[i] = 1'b0;
      sh_row[i] = '0;
      for (int t = 0; t < SYS_DEG; t++) begin
        if (sys_col(i, t, J) == int'(jcnt)) begin
          en_row[i] = 1'b1;
          sh_row[i] = SB'(sys_shift(i, t, A));
        end
      end
    end
  end

  for (genvar g = 0; g < I; g++) begin : g_row
    circ_shift #(.A(A)) u_rot (
      .din(in_vec), .shift(sh_row[g]), .dout(x_row[g])
    );
    xor_processor #(.A(A)) u_xp (
      .clk(clk), .rst_n(rst_n), .valid(take), .first(jcnt == '0), .en(en_row[g]),
      .x(x_row[g]), .sum(acc[g]), .sum_next(acc_nxt[g])
    );
  end

  // Dual-diagonal back-substitution q_i = s'_i + q_(i-1), i.e. q_i = s'_1 + ... + s'_i,
  // computed as a log-depth prefix-XOR tree (Kogge-Stone): after level d every entry
  // holds the XOR of up to 2^(d+1) consecutive block-row sums ending at itself.
  localparam int LV = (I > 1) ? $clog2(I) : 1;
  logic [A-1:0] pfx [LV+1][I];

  always_comb begin
    for (int i = 0; i < I; i++) pfx[0][i] = acc_nxt[i];
    for (int d = 0; d < LV; d++)
      for (int i = 0; i < I; i++)
        pfx[d+1][i] = (i >= (1 << d)) ? (pfx[d][i] ^ pfx[d][i - (1 << d)]) : pfx[d][i];
    for (int i = 0; i < I; i++) q_nxt[i] = pfx[LV][i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      jcnt      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < I; i++) parity[i] <= '0;
    end else begin
      out_valid <= last;
      if (take) jcnt <= last ? '0 : jcnt + 1'b1;
      if (last) parity <= q_nxt;
    end
  end
endmodule
