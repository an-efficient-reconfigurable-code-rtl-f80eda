// tb_tx_controller: two frames at full size. For each: the J systematic vectors and q_I
// must leave back to back (J+1 consecutive cycles) in that order with the right block
// column tags, ready must stay low meanwhile; then every request must bring exactly one
// further parity vector, one cycle later, in the order q16, q8, q24, the other evens,
// the odds (checked against a literal list); a request after the last one must bring
// nothing and all_sent must be set.
module tb_tx_controller;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cap_valid = 0, par_valid = 0, more_req = 0;
  logic [A-1:0] cap_vec;
  logic [A-1:0] parity [I];
  logic ready, seg_valid, all_sent;
  logic [A-1:0] seg_data;
  logic [5:0] seg_col;
  logic [6:0] seg_num;
  logic [5:0] npar_sent;
  blkvec_t msg [J];
  int checks = 0, failures = 0;

  tx_controller dut (.clk(clk), .rst_n(rst_n), .cap_valid(cap_valid), .cap_vec(cap_vec),
    .par_valid(par_valid), .parity(parity), .more_req(more_req), .ready(ready),
    .seg_valid(seg_valid), .seg_data(seg_data), .seg_col(seg_col), .seg_num(seg_num),
    .npar_sent(npar_sent), .all_sent(all_sent));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cap_vec = '0;
    for (int i = 0; i < I; i++) parity[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int j = 0; j < J; j++) msg[j] = {$urandom, $urandom, $urandom};
      for (int j = 0; j < J; j++) begin
        #1 check(ready, "ready while collecting");
        cap_valid <= 1;
        cap_vec   <= msg[j];
        @(posedge clk);
      end
      cap_valid <= 0;
      #1 check(!ready, "not ready with a full buffer");
      @(posedge clk);
      par_valid <= 1;
      for (int i = 0; i < I; i++) parity[i] <= {$urandom, $urandom, $urandom};
      @(posedge clk);
      par_valid <= 0;
      // base transmission: J+1 consecutive segments
      @(posedge clk);
      for (int k = 0; k <= J; k++) begin
        #1;
        check(seg_valid, "segment valid in base transmission");
        if (k < J) check(!ready, "not ready while sending");
        check(int'(seg_num) == k, "segment number");
        if (k < J) begin
          check(seg_data == msg[k], "systematic data");
          check(int'(seg_col) == k, "systematic column");
        end else begin
          check(seg_data == parity[I-1], "q_I data");
          check(int'(seg_col) == J + I - 1, "q_I column");
          check(npar_sent == 1, "one parity vector sent");
        end
        @(posedge clk);
      end
      #1 check(!seg_valid, "base transmission is J+1 segments");
      check(ready, "ready after base transmission");
      // retransmissions on request
      for (int m = 1; m < I; m++) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        more_req <= 1;
        @(posedge clk);
        more_req <= 0;
        #1;
        check(seg_valid, "segment after request");
        check(int'(seg_col) == J + order32(m) - 1, "parity order");
        check(seg_data == parity[order32(m) - 1], "parity data");
        check(int'(npar_sent) == m + 1, "parity count");
        @(posedge clk);
        #1 check(!seg_valid, "one segment per request");
      end
      check(all_sent, "all sent");
      more_req <= 1;
      @(posedge clk);
      more_req <= 0;
      #1 check(!seg_valid, "no segment after the last");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
