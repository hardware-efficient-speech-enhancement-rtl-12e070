// tb_hann_window: streams random frames through the window and compares each
// output with x*w[n], w computed here from 0.5 - 0.5*cos(2*pi*n/399); checks
// the one-cycle latency of valid and index.
module tb_hann_window;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [8:0] in_idx, out_idx;
  logic signed [15:0] in_data, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  hann_window dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; in_idx = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < 400; n++) begin
        int w, xin;
        longint p;
        @(negedge clk);
        xin = int'($signed(16'($urandom)));
        in_valid = 1; in_idx = 9'(n); in_data = 16'(xin);
        w = int'($floor(32768.0 * (0.5 - 0.5 * $cos(2.0 * 3.14159265358979 * n / 399.0)) + 0.5));
        if (w > 32767) w = 32767;
        p = (longint'(xin) * w + 16384) >>> 15;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_idx != 9'(n) || out_data != 16'(p)) begin
          failures++; if (failures < 10) $display("n=%0d got %0d exp %0d", n, out_data, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
