// tb_magnitude_processor: random and corner-case inputs; every output must equal
// phi(min(127, sum over the other seven of phi(|x_i|))) with phi from real arithmetic.
module tb_magnitude_processor;
  import tb_ref_pkg::*;
  logic [6:0] xin [8];
  logic [6:0] yout [8];
  int checks = 0, failures = 0;

  magnitude_processor #(.N(8)) dut (.xin(xin), .yout(yout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 8; i++) begin
        case (n % 4)
          0: xin[i] = 7'($urandom_range(0, 127));
          1: xin[i] = 7'($urandom_range(0, 24));
          2: xin[i] = (i == n % 8) ? 7'($urandom_range(0, 40)) : 7'd127;
          default: xin[i] = 7'($urandom_range(8, 60));
        endcase
      end
      #1;
      for (int j = 0; j < 8; j++) begin
        int s;
        s = 0;
        for (int i = 0; i < 8; i++) if (i != j) s += phi_ref(int'(xin[i]));
        if (s > 127) s = 127;
        checks++;
        if (int'(yout[j]) != phi_ref(s)) begin
          failures++;
          if (failures < 10) $display("set %0d out %0d: %0d expected %0d", n, j, yout[j], phi_ref(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
