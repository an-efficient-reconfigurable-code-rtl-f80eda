// tb_phi_lut: compares all 128 entries of the phi table with -ln(tanh(x/2)) computed in
// real arithmetic, and checks that the table is monotonically non-increasing.
module tb_phi_lut;
  import tb_ref_pkg::*;
  logic [6:0] x, y;
  int checks = 0, failures = 0;
  int prev;

  phi_lut dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 127;
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if (int'(y) != phi_ref(v)) begin
        failures++;
        $display("phi(%0d) = %0d, expected %0d", v, y, phi_ref(v));
      end
      checks++;
      if (int'(y) > prev) failures++;
      prev = int'(y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
