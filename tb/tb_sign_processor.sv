// tb_sign_processor: all 256 sign patterns; each output must be the product (XOR) of the
// other seven signs and prod the product of all eight.
module tb_sign_processor;
  logic [7:0] sin, sout;
  logic       prod;
  int checks = 0, failures = 0;

  sign_processor #(.N(8)) dut (.sin(sin), .prod(prod), .sout(sout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones;
      sin = 8'(v);
      #1;
      ones = $countones(sin);
      checks++;
      if (prod != ones[0]) failures++;
      for (int i = 0; i < 8; i++) begin
        int others;
        others = ones - int'(sin[i]);
        checks++;
        if (sout[i] != others[0]) begin
          failures++;
          $display("pattern %b out %0d: %b", sin, i, sout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
