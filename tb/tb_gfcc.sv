// tb_gfcc: feeds random filterbank outputs for 64 channels over 160-sample
// hops and checks, per frame, every cochleagram value (integer cube root of
// the summed squares >> 5, found here by search) and all 31 DCT coefficients
// (computed here with cosines rounded to Q2.14), plus the frame time.
module tb_gfcc;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fb_valid, hop, coch_valid, feat_valid, done;
  logic [5:0] fb_ch, coch_ch;
  logic signed [15:0] fb_data, coch_data, feat_data;
  logic [4:0] feat_idx;
  int checks = 0, failures = 0;
  longint acc[64];
  int r[64];
  int ct[256];
  always #5 clk = ~clk;
  gfcc dut (.*);
  initial begin
    repeat (2000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && coch_valid) begin
    checks++;
    if (int'(coch_data) != r[coch_ch]) begin failures++; if (failures < 10) $display("coch %0d = %0d exp %0d", coch_ch, coch_data, r[coch_ch]); end
  end
  always @(posedge clk) if (rst_n && feat_valid) begin
    longint s;
    int e;
    s = 0;
    for (int n = 0; n < 64; n++) s += longint'(r[n]) * ct[((2 * n + 1) * feat_idx) % 256];
    e = int'(s >>> 17);
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    checks++;
    if (int'(feat_data) != e) begin failures++; if (failures < 10) $display("g%0d = %0d exp %0d", feat_idx, feat_data, e); end
  end
  initial begin
    for (int m = 0; m < 256; m++) ct[m] = int'($floor(16384.0 * $cos(2.0 * 3.14159265358979 * m / 256.0) + 0.5));
    fb_valid = 0; fb_ch = 0; fb_data = 0; hop = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      int cyc;
      for (int c = 0; c < 64; c++) acc[c] = 0;
      for (int n = 0; n < 160; n++)
        for (int c = 0; c < 64; c++) begin
          int v;
          v = int'($signed(16'($urandom))) >>> (c % 12);
          acc[c] += longint'(v) * v;
          @(negedge clk); fb_valid = 1; fb_ch = 6'(c); fb_data = 16'(v);
        end
      @(negedge clk); fb_valid = 0;
      for (int c = 0; c < 64; c++) begin
        longint v;
        v = acc[c] >> 5;
        if (v > 64'h3_ffff_ffff) v = 64'h3_ffff_ffff;
        r[c] = 0;
        while (longint'(r[c] + 1) * (r[c] + 1) * (r[c] + 1) <= v) r[c]++;
      end
      hop = 1; @(negedge clk); hop = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > 64 * 12 + 31 * 64 + 10) begin failures++; $display("frame took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
