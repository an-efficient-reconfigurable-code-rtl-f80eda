// syndrome_check: tests whether a hard-decision word satisfies every parity check of the
// mother matrix, M x^T = 0. For each block row i it rotates the hard-decision vectors of
// the block columns that hold a non-null circulant by the circulant's shift (all shifts
// are constants of the matrix, so the rotations are wiring), XORs them together with the
// parity vectors q_i and q_(i-1), and reports the block row as failing if any bit of the
// result is 1. ok is the AND over all block rows. The decoder uses it to stop as soon
// as a codeword is found; the design states the stopping rule, the circuit is this
// design's own. Purely combinational.
module syndrome_check
  import rcrc_pkg::*;
#(
  parameter int A = RC_A,
  parameter int J = RC_J,
  parameter int I = RC_I
) (
  input  logic [A-1:0] hd [J+I],
  output logic [I-1:0] row_fail,
  output logic         ok
);
  logic [A-1:0] s [I];

  always_comb begin
    for (int i = 0; i < I; i++) begin
      s[i] = hd[J + i];
      if (i > 0) s[i] ^= hd[J + i - 1];
      for (int t = 0; t < SYS_DEG; t++) begin
        for (int r = 0; r < A; r++)
          s[i][r] ^= hd[sys_col(i, t, J)][(r + sys_shift(i, t, A)) % A];
      end
      row_fail[i] = |s[i];
    end
    ok = ~|row_fail;
  end
endmodule
