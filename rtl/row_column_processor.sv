// row_column_processor: junction row-column processor of the layered sum-product
// decoder, for one parity-check row of degree up to 8. It merges the column (variable)
// update into the row (check) update:
//   x_n   = Z_n - y_mn                  column-to-row message (old row message removed)
//   y'_mn = sign: product of the other signs (sign_processor)
//           magnitude: phi(sum_{i != n} phi(|x_i|)) (magnitude_processor)
//   Z'_n  = x_n + y'_mn                 new a-posteriori LLR
// The s_to_u converters turn the signed x_n into sign and 7-bit magnitude, the u_to_s
// converters turn the stored and the new sign/magnitude messages back into two's
// complement. Inputs with act = 0 are not edges of this row: they are fed to the check
// update as magnitude 127 (phi = 0, no influence) and pass Z and y through unchanged.
// The saturation of Z' to ZW bits is this design's choice.
// Purely combinational.
module row_column_processor
  import rcrc_pkg::*;
#(
  parameter int N = DEG
) (
  input  logic               [N-1:0] act,
  input  logic signed [ZW-1:0]       z_in  [N],
  input  msg_t                       y_old [N],
  output logic signed [ZW-1:0]       z_out [N],
  output msg_t                       y_new [N]
);
  localparam int XW = ZW + 1;
  localparam logic signed [XW:0] ZMAX = (XW+1)'((1 << (ZW - 1)) - 1);
  localparam logic signed [XW:0] ZMIN = -(XW+1)'(1 << (ZW - 1));

  logic signed [MAG_W:0]  yo_s [N];
  logic signed [MAG_W:0]  yn_s [N];
  logic signed [XW-1:0]   x    [N];
  logic                   xs   [N];
  logic [MAG_W-1:0]       xm   [N];
  logic [N-1:0]           sin;
  logic [N-1:0]           sout;
  logic                   sprod;
  logic [MAG_W-1:0]       min_ [N];
  logic [MAG_W-1:0]       mout [N];
  logic signed [XW:0]     zsum [N];

  for (genvar g = 0; g < N; g++) begin : g_edge
    u_to_s #(.W(MAG_W)) u_old (.sign(y_old[g].sign), .mag(y_old[g].mag), .y(yo_s[g]));
    assign x[g] = XW'(z_in[g]) - XW'(yo_s[g]);
    s_to_u #(.IN_W(XW), .OUT_W(MAG_W)) u_su (.x(x[g]), .sign(xs[g]), .mag(xm[g]));
    assign sin[g]  = act[g] & xs[g];
    assign min_[g] = act[g] ? xm[g] : '1;
    u_to_s #(.W(MAG_W)) u_new (.sign(sout[g]), .mag(mout[g]), .y(yn_s[g]));
  end

  sign_processor #(.N(N)) u_sign (.sin(sin), .prod(sprod), .sout(sout));
  magnitude_processor #(.N(N)) u_mag (.xin(min_), .yout(mout));

  always_comb begin
    for (int n = 0; n < N; n++) begin
      zsum[n] = (XW+1)'(x[n]) + (XW+1)'(yn_s[n]);
      if (!act[n]) begin
        z_out[n] = z_in[n];
        y_new[n] = y_old[n];
      end else begin
        if (zsum[n] > ZMAX)      z_out[n] = ZW'(ZMAX);
        else if (zsum[n] < ZMIN) z_out[n] = ZW'(ZMIN);
        else                     z_out[n] = ZW'(zsum[n]);
        y_new[n].sign = sout[n];
        y_new[n].mag  = mout[n];
      end
    end
  end
endmodule
