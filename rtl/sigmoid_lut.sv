// sigmoid_lut: logistic sigmoid by table look-up with linear interpolation,
// as in the source design (an LUT of pre-computed results, interpolated between
// the two nearest entries). Purely combinational.
// Input and output are signed Q6.10. The table (sigmoid65.hex) holds
// round(1024 / (1 + exp(-x))) at x = -8 + i/4, i = 0..64; inputs beyond +-8
// saturate to the end entries. Table range and spacing are choices here.
module sigmoid_lut
  import se_pkg::*;
(
  input  logic signed [ACT_W-1:0] x,
  output logic signed [ACT_W-1:0] y
);
  logic [15:0] lut [65];
  initial $readmemh("rtl/sigmoid65.hex", lut);

  logic signed [17:0] xs;     // x + 8.0 in Q.10
  logic [6:0]  idx;
  logic [7:0]  frac;
  logic [15:0] lo, hi;
  logic signed [16:0] d;
  logic signed [25:0] step;

  assign xs   = 18'(x) + 18'sd8192;
  assign idx  = (xs <= 0) ? 7'd0 : (xs >= 18'sd16384) ? 7'd64 : {1'b0, xs[13:8]};
  assign frac = (xs <= 0 || xs >= 18'sd16384) ? 8'd0 : xs[7:0];
  assign lo   = lut[idx];
  assign hi   = (idx == 7'd64) ? lut[64] : lut[idx + 7'd1];
  assign d    = $signed({1'b0, hi}) - $signed({1'b0, lo});
  assign step = d * $signed({1'b0, frac});
  assign y    = ACT_W'($signed({1'b0, lo}) + 17'(step >>> 8));
endmodule
