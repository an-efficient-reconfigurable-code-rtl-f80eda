// tb_rc_encoder: encodes random frames back to back (with one gap) at full size
// (a = 72, J = I = 32). Checks every parity vector against the bit-level reference, that
// the whole codeword satisfies all 2304 parity checks, that out_valid comes exactly one
// cycle after the J-th vector, and the rate of one frame per J cycles.
module tb_rc_encoder;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [A-1:0] in_vec;
  logic [A-1:0] parity [I];
  blkvec_t msg [4][J];
  blkvec_t qref [I];
  blkvec_t cw [J+I];
  int checks = 0, failures = 0;
  int frames_out = 0;
  longint last_in_cycle [4];
  longint cycle = 0;

  rc_encoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(1'b1),
    .in_vec(in_vec), .out_valid(out_valid), .parity(parity));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 4; f++)
      for (int j = 0; j < J; j++) msg[f][j] = {$urandom, $urandom, $urandom};
    in_vec = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      if (f == 2) begin
        in_valid <= 0;
        repeat (3) @(posedge clk);
      end
      for (int j = 0; j < J; j++) begin
        in_valid <= 1;
        in_vec   <= msg[f][j];
        @(posedge clk);
        if (j == J - 1) last_in_cycle[f] = cycle;
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (frames_out != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      encode_ref(msg[frames_out], qref);
      for (int i = 0; i < I; i++) begin
        checks++;
        if (parity[i] != qref[i]) begin
          failures++;
          $display("frame %0d q_%0d mismatch", frames_out, i + 1);
        end
      end
      for (int j = 0; j < J; j++) cw[j] = msg[frames_out][j];
      for (int i = 0; i < I; i++) cw[J + i] = parity[i];
      checks++;
      if (unsat_ref(cw) != 0) failures++;
      // latency: out_valid is seen one cycle after the last vector was taken
      checks++;
      if (cycle != last_in_cycle[frames_out] + 1) begin
        failures++;
        $display("frame %0d latency %0d", frames_out, cycle - last_in_cycle[frames_out]);
      end
      frames_out++;
    end
  end
endmodule
