// rcrc_pkg: sizes, number formats and the mother-matrix description shared by the
// rate-compatible QC-LDPC encoder, transmission controller and decoder.
//
// The mother parity-check matrix M has I block rows and J+I block columns of a x a
// circulants. Block columns 0..J-1 carry the systematic vectors p_1..p_J, block columns
// J..J+I-1 the parity vectors q_1..q_I. The parity part is dual diagonal: block row i
// holds an identity at q_i and (for i > 1) at q_(i-1), so the parity vectors follow from
// a running XOR of the block-row sums. The sizes (a = 72, J = I = 32, row degree 8,
// lowest rate 1/2) follow the description of the design; the exact positions and shift
// values of the systematic circulants were given only in a figure, so the functions
// sys_col and sys_shift below define this design's own placement: six circulants per
// block row (row degree 6 + 2 = 8), block column (i + OFF[t]) mod J, shift
// S = (7*i + 11*t*t + 3*i*t + 1) mod a. The offsets {0,1,3,7,12,20} are distinct for
// J >= 21 and J = 16.
//
// A circulant with shift S maps a vector p to x with x[r] = p[(r + S) mod a], i.e. a left
// rotation of p by S places when bit 0 is the first bit.
//
// Number formats (decoder): channel LLRs are 8-bit two's complement with 4 fractional
// bits; the a-posteriori LLRs held in the decoder are 10-bit two's complement with the
// same scaling; extrinsic messages are sign + 7-bit magnitude (3.4 fixed point), the
// width of the phi look-up table.
package rcrc_pkg;

  localparam int RC_A    = 72;  // circulant size a
  localparam int RC_J    = 32;  // systematic block columns J
  localparam int RC_I    = 32;  // block rows = parity block columns I
  localparam int SYS_DEG = 6;   // systematic circulants per block row
  localparam int DEG     = 8;   // row degree handled by a row-column processor
  localparam int DEC_PAR = 36;  // rows processed in parallel by the decoder

  localparam int LLR_W = 8;     // channel LLR width (4 fractional bits)
  localparam int ZW    = 10;    // a-posteriori LLR width
  localparam int MAG_W = 7;     // message magnitude width (3.4 fixed point)

  // Extrinsic message as stored: sign and magnitude.
  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
  } msg_t;

  function automatic int sys_offset(input int t);
    case (t)
      0:       return 0;
      1:       return 1;
      2:       return 3;
      3:       return 7;
      4:       return 12;
      default: return 20;
    endcase
  endfunction

  // Block column of the t-th systematic circulant of block row i (0-based).
  function automatic int sys_col(input int i, input int t, input int nj);
    return (i + sys_offset(t)) % nj;
  endfunction

  // Shift value of the t-th systematic circulant of block row i.
  function automatic int sys_shift(input int i, input int t, input int na);
    return (7 * i + 11 * t * t + 3 * i * t + 1) % na;
  endfunction

  // 1-based index of the parity vector sent k-th (k = 0 first). Order: q_I, q_I/2,
  // q_I/4, q_3I/4, then the remaining even indices ascending, then the odd ones.
  function automatic int tx_parity(input int k, input int ni);
    int cnt;
    int res;
    cnt = 4;
    res = ni;
    case (k)
      0: res = ni;
      1: res = ni / 2;
      2: res = ni / 4;
      3: res = 3 * ni / 4;
      default: begin
        for (int p = 2; p <= ni; p += 2) begin
          if (p != ni && p != ni / 2 && p != ni / 4 && p != 3 * ni / 4) begin
            if (cnt == k) res = p;
            cnt++;
          end
        end
        for (int p = 1; p <= ni; p += 2) begin
          if (cnt == k) res = p;
          cnt++;
        end
      end
    endcase
    return res;
  endfunction

endpackage
