// tb_row_column_processor: random LLRs, old messages and edge masks; the new messages
// and LLRs are recomputed from the sum-product formulas with phi in real arithmetic:
// x = Z - y_old, sign' = product of the other signs, |y'| = phi(sum of phi(|x_i|) over
// the other active edges), Z' = x + y' clipped to 10 bits; inactive edges unchanged.
module tb_row_column_processor;
  import rcrc_pkg::*;
  import tb_ref_pkg::*;

  logic [DEG-1:0] act;
  logic signed [ZW-1:0] z_in [DEG], z_out [DEG];
  msg_t y_old [DEG], y_new [DEG];
  int checks = 0, failures = 0;

  row_column_processor dut (.act(act), .z_in(z_in), .y_old(y_old), .z_out(z_out),
    .y_new(y_new));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [DEG];
    int xm [DEG];
    bit xs [DEG];
    for (int n = 0; n < 3000; n++) begin
      act = (n % 3 == 0) ? 8'hFF : (n % 3 == 1) ? 8'h7F : 8'($urandom);
      for (int e = 0; e < DEG; e++) begin
        z_in[e]       = (n % 2) ? ZW'($urandom_range(0, 1023)) : ZW'($signed($urandom_range(0, 160)) - 80);
        y_old[e].sign = 1'($urandom);
        y_old[e].mag  = (n < 100) ? 7'd0 : 7'($urandom_range(0, 127));
      end
      #1;
      for (int e = 0; e < DEG; e++) begin
        x[e]  = int'(z_in[e]) - (y_old[e].sign ? -int'(y_old[e].mag) : int'(y_old[e].mag));
        xs[e] = (x[e] < 0);
        xm[e] = (x[e] < 0) ? -x[e] : x[e];
        if (xm[e] > 127) xm[e] = 127;
      end
      for (int e = 0; e < DEG; e++) begin
        int  s, m, yv, zr;
        bit  sg;
        if (!act[e]) begin
          checks++;
          if (z_out[e] != z_in[e] || y_new[e] != y_old[e]) failures++;
          continue;
        end
        s  = 0;
        sg = 0;
        for (int i = 0; i < DEG; i++) begin
          if (i != e && act[i]) begin
            s += phi_ref(xm[i]);
            sg ^= xs[i];
          end
        end
        if (s > 127) s = 127;
        m  = phi_ref(s);
        yv = sg ? -m : m;
        zr = x[e] + yv;
        if (zr > 511) zr = 511;
        if (zr < -512) zr = -512;
        checks++;
        if (y_new[e].sign != sg || int'(y_new[e].mag) != m || int'(z_out[e]) != zr) begin
          failures++;
          if (failures < 10)
            $display("set %0d edge %0d: y=%b/%0d z=%0d expected %b/%0d %0d", n, e,
                     y_new[e].sign, y_new[e].mag, z_out[e], sg, m, zr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
