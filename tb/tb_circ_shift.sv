// tb_circ_shift: random vectors and every shift 0..71, for 1-bit elements (encoder use)
// and 10-bit elements (decoder use); out[r] must equal in[(r+S) mod 72].
module tb_circ_shift;
  localparam int A = 72;
  logic [A-1:0]    d1, o1;
  logic [A*10-1:0] d10, o10;
  logic [6:0]      sh;
  int checks = 0, failures = 0;

  circ_shift #(.A(A), .EW(1))  dut1  (.din(d1),  .shift(sh), .dout(o1));
  circ_shift #(.A(A), .EW(10)) dut10 (.din(d10), .shift(sh), .dout(o10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3; n++) begin
      for (int s = 0; s < A; s++) begin
        for (int r = 0; r < A; r++) begin
          d1[r] = 1'($urandom);
          d10[r*10 +: 10] = 10'($urandom);
        end
        sh = 7'(s);
        #1;
        for (int r = 0; r < A; r++) begin
          checks += 2;
          if (o1[r] != d1[(r + s) % A]) failures++;
          if (o10[r*10 +: 10] != d10[((r + s) % A)*10 +: 10]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
