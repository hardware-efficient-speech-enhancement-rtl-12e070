// tb_fft_r22sdf: streams four back-to-back 256-point complex frames (random,
// a single tone, an impulse, random) followed by zeros, and compares every
// output bin with a direct DFT computed here in floating point (error at most
// 400 on outputs that reach about 2e6). Checks the bit-reversed bin order
// covers each bin once per frame and the 266-beat latency.
module tb_fft_r22sdf;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [15:0] in_re, in_im;
  logic [7:0] out_bin;
  logic signed [25:0] out_re, out_im;
  int checks = 0, failures = 0;
  real xr[4][256], xi[4][256];
  int beat = 0, first_out = -1, nout = 0;
  int hits[4][256];
  always #5 clk = ~clk;
  fft_r22sdf dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && in_valid) begin
    if (out_valid) begin
      int f, k;
      real er, ei, err;
      if (first_out < 0) first_out = beat;
      f = nout / 256;
      k = int'(out_bin);
      if (f < 4) begin
        er = 0; ei = 0;
        for (int n = 0; n < 256; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * k * n / 256.0;
          er += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          ei += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
        err = (real'(out_re) - er) * (real'(out_re) - er) + (real'(out_im) - ei) * (real'(out_im) - ei);
        checks++;
        if (err > 400.0 * 400.0) begin
          failures++; if (failures < 10) $display("frame %0d bin %0d got %0d,%0d exp %f,%f", f, k, out_re, out_im, er, ei);
        end
        hits[f][k]++;
      end
      nout++;
    end
    beat++;
  end
  initial begin
    for (int n = 0; n < 256; n++) begin
      xr[0][n] = real'(int'($urandom % 16384) - 8192); xi[0][n] = real'(int'($urandom % 16384) - 8192);
      xr[1][n] = $floor(8000.0 * $cos(2.0 * 3.14159265358979 * 17 * n / 256.0)); xi[1][n] = 0;
      xr[2][n] = (n == 5) ? 30000.0 : 0.0; xi[2][n] = 0;
      xr[3][n] = real'(int'($urandom % 65536) - 32768); xi[3][n] = real'(int'($urandom % 65536) - 32768);
    end
    in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++)
      for (int n = 0; n < 256; n++) begin
        @(negedge clk);
        in_valid = (n % 7 != 3) || 1'b1;
        in_re = (f < 4) ? 16'(int'(xr[f][n])) : 16'd0;
        in_im = (f < 4) ? 16'(int'(xi[f][n])) : 16'd0;
      end
    @(negedge clk); in_valid = 0;
    checks++;
    if (first_out != 266) begin failures++; $display("first output at beat %0d", first_out); end
    for (int f = 0; f < 4; f++) for (int k = 0; k < 256; k++) begin
      checks++;
      if (hits[f][k] != 1) begin failures++; if (failures < 20) $display("frame %0d bin %0d seen %0d times", f, k, hits[f][k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
