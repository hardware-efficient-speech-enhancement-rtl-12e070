// tb_enhance_mix: loads random cochleagram, mapping and mask values and checks
// the 64 outputs for each mode (map, noisy*mask, map*mask) and for a
// noise-only frame (zeros); also checks that cochleagram values written after
// latch do not affect the frame being output.
module tb_enhance_mix;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic coch_we, dnn_valid, speech, latch, go, out_valid, done;
  logic [5:0] coch_ch, out_ch;
  logic [6:0] dnn_idx;
  logic signed [15:0] coch_data, dnn_data, out_data;
  se_mode_e mode;
  int checks = 0, failures = 0;
  int cz[64], mp[64], mk[64], expv[64];
  always #5 clk = ~clk;
  enhance_mix dut (.*);
  function automatic int sat(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : int'(v);
  endfunction
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_data) != expv[out_ch]) begin failures++; if (failures < 10) $display("ch %0d got %0d exp %0d", out_ch, out_data, expv[out_ch]); end
  end
  initial begin
    coch_we = 0; dnn_valid = 0; speech = 0; latch = 0; go = 0; coch_ch = 0; dnn_idx = 0; coch_data = 0; dnn_data = 0;
    mode = MODE_MAP;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      se_mode_e m;
      bit sp;
      m  = se_mode_e'(1 + f % 3);
      sp = (f != 3 && f != 7);
      for (int c = 0; c < 64; c++) begin
        @(negedge clk); coch_we = 1; coch_ch = 6'(c); cz[c] = int'($urandom % 4096); coch_data = 16'(cz[c]);
      end
      @(negedge clk); coch_we = 0; latch = 1;
      @(negedge clk); latch = 0;
      for (int i = 0; i < 128; i++) begin
        int v;
        v = (i < 64) ? int'($signed(16'($urandom))) : int'($urandom % 1025);
        if (i < 64) mp[i] = v; else mk[i - 64] = v;
        @(negedge clk); dnn_valid = 1; dnn_idx = 7'(i); dnn_data = 16'(v);
        // a later frame's cochleagram arriving meanwhile
        coch_we = 1; coch_ch = 6'(i % 64); coch_data = 16'($urandom);
      end
      @(negedge clk); dnn_valid = 0; coch_we = 0;
      for (int c = 0; c < 64; c++)
        expv[c] = !sp ? 0 : (m == MODE_MAP) ? mp[c] :
                  (m == MODE_MASK) ? sat((longint'(cz[c]) * mk[c]) >>> 10) : sat((longint'(mp[c]) * mk[c]) >>> 10);
      mode = m; speech = sp; go = 1;
      @(negedge clk); go = 0; mode = MODE_NONE; speech = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
