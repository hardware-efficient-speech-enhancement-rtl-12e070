// tb_gammatone_fb: loads stable random second-order sections for all 64x4
// sections, streams 200 samples 300 cycles apart and compares every channel
// output with a cascade model computed here. Checks that each sample takes
// 257 cycles (in_ready low) and that all 64 channels appear in order.
module tb_gammatone_fb;
  logic clk = 0, rst_n = 0;
  logic cfg_we, in_valid, in_ready, out_valid;
  logic [7:0] cfg_addr;
  logic [1:0] cfg_sel;
  logic signed [15:0] cfg_data, in_data, out_data;
  logic [5:0] out_ch;
  int checks = 0, failures = 0;
  int co[4][256];
  int s0[256], s1[256];
  int expy[64];
  int nout, busy_cycles;
  always #5 clk = ~clk;
  gammatone_fb dut (.*);
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_ch) != nout || int'(out_data) != expy[out_ch]) begin
      failures++; if (failures < 10) $display("ch %0d (exp ch %0d) y=%0d exp %0d", out_ch, nout, out_data, expy[out_ch]);
    end
    nout++;
  end
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_sel = 0; cfg_data = 0; in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 256; s++) begin
      // poles at radius r, angle th: a1 = -2 r cos th, a2 = r^2
      real r, th;
      r  = 0.80 + 0.15 * ($urandom % 100) / 100.0;
      th = 0.05 + 2.5 * ($urandom % 100) / 100.0;
      co[0][s] = int'(-2.0 * r * $cos(th) * 16384.0);
      co[1][s] = int'(r * r * 16384.0);
      co[2][s] = int'($urandom % 8192) - 4096;
      co[3][s] = int'($urandom % 8192) - 4096;
      s0[s] = 0; s1[s] = 0;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); cfg_we = 1; cfg_addr = 8'(s); cfg_sel = 2'(k); cfg_data = 16'(co[k][s]);
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 200; n++) begin
      int xs;
      xs = int'($signed(16'($urandom))) >>> 2;
      for (int c = 0; c < 64; c++) begin
        int x;
        x = xs;
        for (int k = 0; k < 4; k++) begin
          int s, w;
          s = c * 4 + k;
          w = sat((((longint'(x) <<< 14) - longint'(co[0][s]) * s0[s] - longint'(co[1][s]) * s1[s] + 8192) >>> 14));
          x = sat(((longint'(co[2][s]) * w + longint'(co[3][s]) * s0[s] + 8192) >>> 14));
          s1[s] = s0[s]; s0[s] = w;
        end
        expy[c] = x;
      end
      nout = 0;
      @(negedge clk); in_valid = 1; in_data = 16'(xs);
      @(negedge clk); in_valid = 0;
      busy_cycles = 0;
      while (!in_ready) begin @(negedge clk); busy_cycles++; end
      checks++;
      if (busy_cycles != 257) begin failures++; $display("busy %0d cycles", busy_cycles); end
      repeat (40) @(negedge clk);
      checks++;
      if (nout != 64) begin failures++; $display("outputs %0d", nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
