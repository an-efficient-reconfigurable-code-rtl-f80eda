// tb_syndrome_check: valid codewords from the reference encoder must pass; flipping one
// random bit must fail exactly the block rows whose checks involve that bit (counted
// from the check equations); the all-zero word must pass.
module tb_syndrome_check;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic [A-1:0] hd [J+I];
  logic [I-1:0] row_fail;
  logic ok;
  blkvec_t p [J];
  blkvec_t q [I];
  int checks = 0, failures = 0;

  syndrome_check dut (.hd(hd), .row_fail(row_fail), .ok(ok));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < J + I; c++) hd[c] = '0;
    #1;
    checks++;
    if (!ok) failures++;
    for (int n = 0; n < 40; n++) begin
      int c, r, nrows;
      for (int j = 0; j < J; j++) p[j] = {$urandom, $urandom, $urandom};
      encode_ref(p, q);
      for (int j = 0; j < J; j++) hd[j] = p[j];
      for (int i = 0; i < I; i++) hd[J + i] = q[i];
      #1;
      checks++;
      if (!ok || row_fail != '0) failures++;
      c = $urandom_range(0, J + I - 1);
      r = $urandom_range(0, A - 1);
      hd[c][r] = ~hd[c][r];
      #1;
      // block rows that contain column c
      nrows = 0;
      for (int i = 0; i < I; i++) begin
        bit inrow;
        inrow = (c == J + i) || (i > 0 && c == J + i - 1);
        for (int t = 0; t < SYS_DEG; t++) if (sys_col(i, t, J) == c) inrow = 1;
        checks++;
        if (row_fail[i] != inrow) failures++;
        nrows += int'(inrow);
      end
      checks++;
      if (ok || nrows == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
