// tb_frame_buffer: feeds a numbered sample stream (one sample every 40
// cycles) and checks that the first frame comes after 400 samples, each next
// one after 160 more, and that every frame holds the last 400 samples in order.
module tb_frame_buffer;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, hop, out_valid;
  logic signed [15:0] in_data, out_data;
  logic [8:0] out_idx;
  int checks = 0, failures = 0, nsamp = 0, frames = 0, last_end = 0;
  always #5 clk = ~clk;
  frame_buffer dut (.*);
  initial begin
    repeat (300000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1400; i++) begin
      @(negedge clk); in_valid = 1; in_data = 16'(i * 7 + 3);
      @(negedge clk); in_valid = 0;
      nsamp++;
      repeat (38) @(negedge clk);
    end
    checks++;
    if (frames != 7) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && hop) begin
    checks++;
    if (nsamp != 400 + 160 * frames) begin failures++; $display("hop at sample %0d", nsamp); end
    last_end = nsamp;
    frames++;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_data != 16'((last_end - 400 + int'(out_idx)) * 7 + 3)) begin
      failures++; if (failures < 10) $display("idx %0d data %0d", out_idx, out_data);
    end
  end
endmodule
