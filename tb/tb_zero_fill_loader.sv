// tb_zero_fill_loader: after frame_start every LLR must be 0; the k-th received segment
// must land in block column k (k < J) or in the column of the (k-J)-th parity vector of
// the transmission order (literal list); columns never received must stay 0; a second
// frame_start must clear everything again; a segment beyond J+I must set overflow.
module tb_zero_fill_loader;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0, seg_valid = 0;
  logic signed [LLR_W-1:0] seg_llr [A];
  logic signed [LLR_W-1:0] ch_llr [J+I][A];
  logic [J+I-1:0] received;
  logic [6:0] nseg;
  logic overflow;
  logic signed [LLR_W-1:0] sent [J+I][A];
  bit   was_sent [J+I];
  int checks = 0, failures = 0;

  zero_fill_loader dut (.clk(clk), .rst_n(rst_n), .frame_start(frame_start),
    .seg_valid(seg_valid), .seg_llr(seg_llr), .ch_llr(ch_llr), .received(received),
    .nseg(nseg), .overflow(overflow));

  always #5 clk = ~clk;

  task automatic compare_all(input string what);
    for (int c = 0; c < J + I; c++) begin
      checks++;
      if (received[c] != was_sent[c]) failures++;
      for (int r = 0; r < A; r++) begin
        checks++;
        if (ch_llr[c][r] != (was_sent[c] ? sent[c][r] : LLR_W'(0))) begin
          failures++;
          if (failures < 10) $display("%s: column %0d bit %0d", what, c, r);
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < A; r++) seg_llr[r] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      int nsend;
      nsend = (f == 0) ? J + 1 : (f == 1) ? J + 9 : J + I;
      for (int c = 0; c < J + I; c++) was_sent[c] = 0;
      frame_start <= 1;
      @(posedge clk);
      frame_start <= 0;
      #1 compare_all("cleared");
      for (int k = 0; k < nsend; k++) begin
        int c;
        c = (k < J) ? k : J + order32(k - J) - 1;
        seg_valid <= 1;
        for (int r = 0; r < A; r++) begin
          sent[c][r] = LLR_W'($urandom);
          seg_llr[r] <= sent[c][r];
        end
        was_sent[c] = 1;
        @(posedge clk);
        if ($urandom_range(0, 2) == 0) begin
          seg_valid <= 0;
          @(posedge clk);
        end
      end
      seg_valid <= 0;
      @(posedge clk);
      #1 compare_all("filled");
      checks++;
      if (int'(nseg) != nsend || overflow) failures++;
    end
    seg_valid <= 1;
    @(posedge clk);
    seg_valid <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (!overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
