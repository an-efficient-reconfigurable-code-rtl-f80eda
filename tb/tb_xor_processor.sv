// tb_xor_processor: random frames of vectors with random enables and idle cycles; the
// accumulator must equal the XOR of the enabled vectors since the last 'first'.
module tb_xor_processor;
  localparam int A = 72;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, en = 0;
  logic [A-1:0] x, sum, sum_next, ref_sum;
  int checks = 0, failures = 0;

  xor_processor #(.A(A)) dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first),
    .en(en), .x(x), .sum(sum), .sum_next(sum_next));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sum = '0;
    x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 20; f++) begin
      for (int j = 0; j < 32; j++) begin
        valid <= ($urandom_range(0, 3) != 0);
        first <= (j == 0);
        en    <= 1'($urandom);
        x     <= {$urandom, $urandom, $urandom};
        if (j == 0) valid <= 1'b1;
        @(posedge clk);
        #1;
        if (valid) begin
          if (first) ref_sum = en ? x : '0;
          else if (en) ref_sum ^= x;
        end
        checks++;
        if (sum != ref_sum) begin
          failures++;
          if (failures < 10) $display("frame %0d step %0d mismatch", f, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
