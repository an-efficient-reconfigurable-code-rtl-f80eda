// tb_s_to_u: every 11-bit input; sign must be the MSB and the magnitude |x| clipped
// to 127.
module tb_s_to_u;
  logic signed [10:0] x;
  logic               sign;
  logic [6:0]         mag;
  int checks = 0, failures = 0;

  s_to_u #(.IN_W(11), .OUT_W(7)) dut (.x(x), .sign(sign), .mag(mag));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -1024; v < 1024; v++) begin
      int a;
      x = 11'(v);
      #1;
      a = (v < 0) ? -v : v;
      if (a > 127) a = 127;
      checks++;
      if (sign != (v < 0) || int'(mag) != a) begin
        failures++;
        if (failures < 10) $display("x=%0d -> %b %0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
