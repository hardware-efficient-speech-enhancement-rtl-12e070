// tb_ams: streams three 400-sample frames (amplitude-modulated tones with
// modulation rates of 20, 100 and 300 Hz plus noise) and compares the 15 AMS
// features with a floating-point model built here: mean of |x| over groups of
// 4, Hanning window, 256-point DFT, max+min/2 magnitude, triangular windows
// centred from bin 1 to bin 25.6. Tolerance 2% + 8 LSB. Also checks that the
// bands at 100 and 300 Hz grow with those modulation rates and the frame time.
module tb_ams;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, feat_valid, done;
  logic [8:0] in_idx;
  logic signed [15:0] in_data, feat_data;
  logic [3:0] feat_idx;
  int checks = 0, failures = 0;
  real expf[15];
  int got[15];
  always #5 clk = ~clk;
  ams dut (.*);
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && feat_valid) got[feat_idx] = int'(feat_data);
  function automatic real triw(int b, int k);
    int c, d;
    c = 256 + b * 450;
    d = (k * 256 > c) ? k * 256 - c : c - k * 256;
    return (d >= 450) ? 0.0 : real'(((450 - d) * 256) / 450);
  endfunction
  initial begin
    int keep[3][15];
    real rates[3];
    rates = '{20.0, 100.0, 300.0};
    in_valid = 0; in_idx = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int x[400];
      int env[100];
      real fr[256], mag[28];
      int cyc;
      for (int n = 0; n < 400; n++)
        x[n] = int'(12000.0 * (1.0 + 0.8 * $sin(2.0 * 3.14159265358979 * rates[f] * n / 16000.0)) *
                    $sin(2.0 * 3.14159265358979 * 1000.0 * n / 16000.0)) + int'($urandom % 200) - 100;
      for (int i = 0; i < 100; i++) begin
        int s;
        s = 0;
        for (int j = 0; j < 4; j++) s += (x[4*i+j] < 0) ? -x[4*i+j] : x[4*i+j];
        env[i] = s >> 2;
      end
      for (int i = 0; i < 256; i++) begin
        int w;
        if (i < 100) begin
          w = int'($floor(32768.0 * (0.5 - 0.5 * $cos(2.0 * 3.14159265358979 * (4 * i + 2) / 399.0)) + 0.5));
          if (w > 32767) w = 32767;
          fr[i] = real'((longint'(env[i]) * w) >>> 15);
        end else fr[i] = 0.0;
      end
      for (int k = 0; k < 28; k++) begin
        real re, im, ar, ai;
        re = 0; im = 0;
        for (int n = 0; n < 100; n++) begin
          re += fr[n] * $cos(2.0 * 3.14159265358979 * k * n / 256.0);
          im -= fr[n] * $sin(2.0 * 3.14159265358979 * k * n / 256.0);
        end
        ar = re < 0 ? -re : re; ai = im < 0 ? -im : im;
        mag[k] = ((ar > ai ? ar : ai) + (ar > ai ? ai : ar) / 2.0) / 4.0;
      end
      for (int b = 0; b < 15; b++) begin
        expf[b] = 0;
        for (int k = 0; k < 28; k++) expf[b] += triw(b, k) * mag[k];
        expf[b] = expf[b] / 65536.0;
        if (expf[b] > 32767.0) expf[b] = 32767.0;
      end
      for (int n = 0; n < 400; n++) begin
        @(negedge clk); in_valid = 1; in_idx = 9'(n); in_data = 16'(x[n]);
      end
      @(negedge clk); in_valid = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > 3 * 256 + 28 * 15 + 10) begin failures++; $display("frame took %0d", cyc); end
      for (int b = 0; b < 15; b++) begin
        real d;
        d = real'(got[b]) - expf[b];
        if (d < 0) d = -d;
        checks++;
        if (d > 0.02 * expf[b] + 8.0) begin failures++; $display("f%0d band %0d got %0d exp %f", f, b, got[b], expf[b]); end
      end
      keep[f] = got;
    end
    checks++;
    // 100 Hz modulation lies in band 3, 300 Hz in band 10
    if (!(keep[1][3] > 2 * keep[0][3] && keep[2][10] > 4 * keep[0][10])) begin
      failures++; $display("modulation bands %0d %0d %0d %0d", keep[0][3], keep[1][3], keep[0][10], keep[2][10]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
