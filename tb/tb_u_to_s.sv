// tb_u_to_s: every sign/magnitude pair of a 7-bit magnitude; the output must be the
// two's complement of +mag or -mag.
module tb_u_to_s;
  logic              sign;
  logic [6:0]        mag;
  logic signed [7:0] y;
  int checks = 0, failures = 0;

  u_to_s #(.W(7)) dut (.sign(sign), .mag(mag), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int m = 0; m < 128; m++) begin
        sign = 1'(s);
        mag  = 7'(m);
        #1;
        checks++;
        if (int'(y) != (s ? -m : m)) begin
          failures++;
          $display("sign %0d mag %0d -> %0d", s, m, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
