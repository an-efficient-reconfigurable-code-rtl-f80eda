// tb_ref_pkg: reference models shared by the testbenches, written independently of the
// RTL data paths: phi from real arithmetic, bit-level encoding and parity checking
// straight from the parity-check equations, and the transmission order as a literal list.
package tb_ref_pkg;
  import rcrc_pkg::*;

  localparam int A = RC_A;
  localparam int J = RC_J;
  localparam int I = RC_I;

  typedef logic [A-1:0] blkvec_t;

  // round(16 * -ln(tanh(x/2))) for x = v/16, clipped to 127; v = 0 gives 127.
  function automatic int phi_ref(input int v);
    real x, t, y;
    int  q;
    if (v <= 0) return 127;
    x = v / 16.0;
    t = (1.0 - $exp(-x)) / (1.0 + $exp(-x));
    y = -$ln(t) * 16.0;
    q = int'($floor(y + 0.5));
    return (q > 127) ? 127 : q;
  endfunction

  // Parity vectors from the check equations, one parity-check row at a time.
  function automatic void encode_ref(input blkvec_t p [J], output blkvec_t q [I]);
    logic s;
    for (int i = 0; i < I; i++) begin
      for (int r = 0; r < A; r++) begin
        s = 1'b0;
        for (int t = 0; t < SYS_DEG; t++)
          s ^= p[sys_col(i, t, J)][(r + sys_shift(i, t, A)) % A];
        q[i][r] = (i == 0) ? s : (s ^ q[i-1][r]);
      end
    end
  endfunction

  // Number of unsatisfied parity checks of a full codeword (J+I block columns).
  function automatic int unsat_ref(input blkvec_t c [J+I]);
    int   n;
    logic s;
    n = 0;
    for (int i = 0; i < I; i++) begin
      for (int r = 0; r < A; r++) begin
        s = c[J + i][r];
        if (i > 0) s ^= c[J + i - 1][r];
        for (int t = 0; t < SYS_DEG; t++)
          s ^= c[sys_col(i, t, J)][(r + sys_shift(i, t, A)) % A];
        if (s) n++;
      end
    end
    return n;
  endfunction

  // Expected transmission order of the parity vectors for I = 32 (1-based indices).
  function automatic int order32(input int k);
    int lst [32] = '{32, 16, 8, 24, 2, 4, 6, 10, 12, 14, 18, 20, 22, 26, 28, 30,
                     1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23, 25, 27, 29, 31};
    return lst[k];
  endfunction
endpackage
