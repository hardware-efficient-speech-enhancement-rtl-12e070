// tb_feat_delta: writes random AMS and GFCC features for four frames, with a
// write of both ports in the same cycle, and checks the 139-value vector of
// each frame: static values, first and second differences (saturated, zero
// history after reset) and the noise level in Q6.10.
module tb_feat_delta;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ams_we, gfcc_we, go, out_valid, done;
  logic [3:0] ams_idx;
  logic [4:0] gfcc_idx;
  logic signed [15:0] ams_data, gfcc_data, out_data;
  logic [15:0] noise;
  logic [7:0] out_idx;
  int checks = 0, failures = 0;
  int cur[46], prv[46], prd[46], expv[139], nout;
  always #5 clk = ~clk;
  feat_delta dut (.*);
  function automatic int sat(int v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : v;
  endfunction
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_idx) != nout || int'(out_data) != expv[out_idx]) begin
      failures++; if (failures < 10) $display("idx %0d got %0d exp %0d", out_idx, out_data, expv[out_idx]);
    end
    nout++;
  end
  initial begin
    ams_we = 0; gfcc_we = 0; go = 0; ams_idx = 0; gfcc_idx = 0; ams_data = 0; gfcc_data = 0; noise = 0;
    for (int i = 0; i < 46; i++) begin prv[i] = 0; prd[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < 31; i++) begin
        @(negedge clk);
        gfcc_we = 1; gfcc_idx = 5'(i); cur[15 + i] = int'($signed(16'($urandom))); gfcc_data = 16'(cur[15 + i]);
        ams_we = (i < 15); ams_idx = 4'(i); cur[i % 15] = (i < 15) ? int'($signed(16'($urandom))) : cur[i % 15];
        ams_data = 16'(cur[i % 15]);
      end
      @(negedge clk); ams_we = 0; gfcc_we = 0;
      noise = 16'($urandom);
      for (int i = 0; i < 46; i++) begin
        int d;
        d = sat(cur[i] - prv[i]);
        expv[i] = cur[i];
        expv[46 + i] = d;
        expv[92 + i] = sat(d - prd[i]);
        prv[i] = cur[i]; prd[i] = d;
      end
      expv[138] = int'(noise >> 5);
      nout = 0;
      go = 1; @(negedge clk); go = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (nout != 139) begin failures++; $display("outputs %0d", nout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
