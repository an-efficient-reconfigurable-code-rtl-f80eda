// tb_rc_decoder: full-size decoder (a = 72, J = I = 32, 36 processors, 50 iterations).
// Codewords come from the reference encoder; the channel is modelled directly as LLRs
// (+ for bit 0) with random reliabilities and a number of bits received with the wrong
// sign. Untransmitted parity vectors get LLR 0. Cases:
//   clean word at the highest rate (p + q_I only): the message must come out unchanged
//   (the 31 erased parity vectors form a chain that 7-bit messages cannot bridge, so the
//   full-matrix syndrome need not be met and decoding may run to the limit);
//   mother code (rate 1/2) with 2 % wrong bits: must decode to the message;
//   rate 32/40 (8 parity vectors, in transmission order) with a few wrong bits;
//   rate 32/33 with one wrong bit: the code is then close to a single parity check per
//   row position and need not be corrected, but a success must be a correct one;
//   noise only (random LLRs): must give up after exactly 50 iterations.
// Every run also checks the cycle count 1 + iterations * (I * A/P + 1).
module tb_rc_decoder;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NH = A / DEC_PAR;
  localparam int CYC_ITER = I * NH + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [LLR_W-1:0] ch_llr [J+I][A];
  logic busy, done, success;
  logic [7:0] iters;
  logic [A-1:0] dec_bits [J];
  blkvec_t p [J];
  blkvec_t q [I];
  blkvec_t cw [J+I];
  int checks = 0, failures = 0;
  longint cycle = 0;

  rc_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .ch_llr(ch_llr), .busy(busy),
    .done(done), .success(success), .iters(iters), .dec_bits(dec_bits));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Builds channel LLRs: npar parity vectors sent (transmission order), nerr wrong bits.
  task automatic make_frame(input int npar, input int nerr, input bit noise_only);
    bit sent [J+I];
    for (int j = 0; j < J; j++) p[j] = {$urandom, $urandom, $urandom};
    encode_ref(p, q);
    for (int j = 0; j < J; j++) cw[j] = p[j];
    for (int i = 0; i < I; i++) cw[J + i] = q[i];
    for (int c = 0; c < J + I; c++) sent[c] = (c < J);
    for (int m = 0; m < npar; m++) sent[J + order32(m) - 1] = 1;
    for (int c = 0; c < J + I; c++) begin
      for (int r = 0; r < A; r++) begin
        int mag;
        mag = $urandom_range(24, 90);
        if (!sent[c]) ch_llr[c][r] = '0;
        else if (noise_only) ch_llr[c][r] = LLR_W'($signed($urandom_range(0, 60)) - 30);
        else ch_llr[c][r] = cw[c][r] ? LLR_W'(-mag) : LLR_W'(mag);
      end
    end
    for (int n = 0; n < nerr; n++) begin
      int c, r, mag;
      do c = $urandom_range(0, J + I - 1); while (!sent[c]);
      r   = $urandom_range(0, A - 1);
      mag = $urandom_range(4, 24);
      ch_llr[c][r] = cw[c][r] ? LLR_W'(mag) : LLR_W'(-mag);
    end
  endtask

  task automatic run(input string name, input int expect_ok, input int exact_iters);
    longint t0;
    bit ok_bits;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    t0 = cycle;
    start <= 0;
    while (!done) @(posedge clk);
    ok_bits = 1;
    for (int j = 0; j < J; j++) if (dec_bits[j] != p[j]) ok_bits = 0;
    $display("%s: success=%0d iterations=%0d bits %s", name, success, iters,
             ok_bits ? "correct" : "wrong");
    // expect_ok: 0 must fail, 1 must succeed, 2 either, 3 either but message correct
    if (expect_ok < 2) check(success == 1'(expect_ok), {name, ": success flag"});
    if (expect_ok == 1 || expect_ok == 3) check(ok_bits, {name, ": decoded message"});
    if (success) check(ok_bits, {name, ": reported success with wrong bits"});
    if (exact_iters > 0) check(int'(iters) == exact_iters, {name, ": iteration count"});
    check(cycle - t0 == longint'(1 + int'(iters) * CYC_ITER), {name, ": cycle count"});
    if (cycle - t0 != longint'(1 + int'(iters) * CYC_ITER)) $display("  %0d cycles", cycle - t0);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < J + I; c++) for (int r = 0; r < A; r++) ch_llr[c][r] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    make_frame(1, 0, 0);
    run("rate 32/33, clean", 3, 0);
    make_frame(4, 3, 0);
    run("rate 32/36, 3 wrong bits", 2, 0);
    make_frame(I, 90, 0);
    run("rate 1/2, 90 wrong bits", 1, 0);
    make_frame(I, 90, 0);
    run("rate 1/2, 90 wrong bits", 1, 0);
    make_frame(8, 6, 0);
    run("rate 32/40, 6 wrong bits", 1, 0);
    make_frame(1, 1, 0);
    run("rate 32/33, 1 wrong bit", 2, 0);
    make_frame(I, 0, 1);
    run("noise only", 0, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
