// tb_rcrc_ldpc_codec: end-to-end test of the codec at its default size (a = 72,
// J = I = 32, 36 decoder lanes, 50 iterations), with no parameter overridden.
// Each frame: a random message enters the encoder; the transmitter sends p and q_I; a
// channel model turns every segment into LLRs (+ for bit 0) with random reliabilities
// and wrong signs at a given per-mille rate; the receiver decodes with the untransmitted
// parity zero-filled; while decoding fails and parity remains, an ARQ request fetches
// the next parity vector and decoding restarts, so the code rate steps down from 32/33
// towards 1/2. Checked: the transmitted segments against the reference encoder, the
// decoded message whenever success is reported, success of the light-noise frames,
// the decoder cycle count, and that every mechanism occurred: encoder back-pressure,
// decoding with zero-filled parity, an ARQ rate switch, an early stop on a valid
// codeword, a stop at the iteration limit and a decode of the full rate-1/2 mother code.
module tb_rcrc_ldpc_codec;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [A-1:0] in_vec;
  logic more_req = 0, seg_valid, tx_all_sent;
  logic [A-1:0] seg_data;
  logic [5:0] seg_col;
  logic [6:0] seg_num;
  logic [5:0] npar_sent;
  logic rx_frame_start = 0, rx_valid = 0;
  logic signed [LLR_W-1:0] rx_llr [A];
  logic [6:0] rx_nseg;
  logic [J+I-1:0] rx_received;
  logic rx_overflow;
  logic dec_start = 0, dec_busy, dec_done, dec_success;
  logic [7:0] dec_iters;
  logic [A-1:0] dec_bits [J];

  blkvec_t msg [J];
  blkvec_t qref [I];
  int pe_permille = 0;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_backpressure = 0, n_zero_fill = 0, n_arq = 0, n_early = 0, n_limit = 0;
  int n_mother = 0;

  rcrc_ldpc_codec dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_vec(in_vec),
    .more_req(more_req), .seg_valid(seg_valid), .seg_data(seg_data), .seg_col(seg_col),
    .seg_num(seg_num), .npar_sent(npar_sent), .tx_all_sent(tx_all_sent),
    .rx_frame_start(rx_frame_start), .rx_valid(rx_valid), .rx_llr(rx_llr),
    .rx_nseg(rx_nseg), .rx_received(rx_received), .rx_overflow(rx_overflow),
    .dec_start(dec_start), .dec_busy(dec_busy), .dec_done(dec_done),
    .dec_success(dec_success), .dec_iters(dec_iters), .dec_bits(dec_bits));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Channel: one cycle of delay, BPSK-like LLRs with some wrong signs. Also checks the
  // segment content against the reference encoder.
  always @(posedge clk) begin
    rx_valid <= seg_valid;
    if (seg_valid && rst_n) begin
      if (int'(seg_col) < J) check(seg_data == msg[seg_col], "systematic segment");
      else check(seg_data == qref[int'(seg_col) - J], "parity segment");
      for (int r = 0; r < A; r++) begin
        int mag;
        bit flip;
        mag  = $urandom_range(24, 90);
        flip = ($urandom_range(0, 999) < pe_permille);
        if (flip) mag = $urandom_range(4, 24);
        rx_llr[r] <= (seg_data[r] ^ flip) ? LLR_W'(-mag) : LLR_W'(mag);
      end
    end
  end

  task automatic decode(output bit ok);
    longint t0;
    bit bits_ok;
    @(posedge clk);
    dec_start <= 1;
    @(posedge clk);
    dec_start <= 0;
    t0 = cycle;
    while (!dec_done) @(posedge clk);
    check(cycle - t0 == longint'(1 + int'(dec_iters) * (I * (A / DEC_PAR) + 1)), "decode cycles");
    bits_ok = 1;
    for (int j = 0; j < J; j++) if (dec_bits[j] != msg[j]) bits_ok = 0;
    if (dec_success) check(bits_ok, "success with the right message");
    if (npar_sent < 6'(I)) n_zero_fill++;
    else n_mother++;
    if (dec_success && int'(dec_iters) < 50) n_early++;
    if (!dec_success && int'(dec_iters) == 50) n_limit++;
    ok = dec_success;
  endtask

  task automatic frame(input int pe, input bit hold_valid, output bit ok, output int npar);
    pe_permille = pe;
    for (int j = 0; j < J; j++) msg[j] = {$urandom, $urandom, $urandom};
    encode_ref(msg, qref);
    @(posedge clk);
    rx_frame_start <= 1;
    @(posedge clk);
    rx_frame_start <= 0;
    for (int j = 0; j < J; j++) begin
      in_valid <= 1;
      in_vec   <= msg[j];
      @(posedge clk);
      while (!in_ready) begin
        n_backpressure++;
        @(posedge clk);
      end
    end
    // hold in_valid with the next vector to show back-pressure, then drop it
    if (hold_valid) begin
      in_vec <= '0;
      repeat (3) begin
        @(posedge clk);
        #1 if (!in_ready) n_backpressure++;
      end
    end
    in_valid <= 0;
    while (rx_nseg != 7'(J + 1)) @(posedge clk);
    decode(ok);
    for (int tries = 0; !ok && !tx_all_sent && tries < I; tries++) begin
      more_req <= 1;
      @(posedge clk);
      more_req <= 0;
      n_arq++;
      @(posedge clk);
      @(posedge clk);
      #1 check(int'(rx_nseg) == J + int'(npar_sent), "one more segment per request");
      decode(ok);
    end
    npar = int'(npar_sent);
    $display("frame pe=%0d/1000: %s with %0d parity vectors (rate %0d/%0d)", pe,
             ok ? "decoded" : "not decoded", npar, J, J + npar);
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int npar;
    in_vec = '0;
    for (int r = 0; r < A; r++) rx_llr[r] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    frame(3, 1, ok, npar);
    check(ok, "light noise frame decoded");
    frame(0, 0, ok, npar);
    check(ok, "noiseless frame decoded");
    frame(250, 1, ok, npar);
    $display("mechanisms: back-pressure %0d, zero-filled decodes %0d, ARQ requests %0d,",
             n_backpressure, n_zero_fill, n_arq);
    $display("            early stops %0d, iteration-limit stops %0d, mother-code decodes %0d",
             n_early, n_limit, n_mother);
    check(n_backpressure > 0, "back-pressure seen");
    check(n_zero_fill > 0, "zero-filled decode seen");
    check(n_arq > 0, "ARQ rate switch seen");
    check(n_early > 0, "early stop seen");
    check(n_limit > 0, "iteration limit seen");
    check(n_mother > 0, "mother-code decode seen");
    check(!rx_overflow, "no receive overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
