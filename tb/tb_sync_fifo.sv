// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, full and empty flags, and that pushes when full are dropped.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [15:0] wr_data, rd_data;
  int checks = 0, failures = 0, nfull = 0;
  logic [15:0] q[$];
  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; wr_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      push = ($urandom % 100) < (i < 2000 ? 70 : 30);
      pop  = ($urandom % 100) < (i < 2000 ? 30 : 70);
      wr_data = 16'($urandom);
      checks++;
      if (empty !== (q.size() == 0)) begin failures++; $display("empty mismatch %0d", q.size()); end
      checks++;
      if (full !== (q.size() == 16)) begin failures++; $display("full mismatch %0d", q.size()); end
      if (full) nfull++;
      if (pop && q.size() > 0) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      @(posedge clk);
      begin
        bit acc_push;
        acc_push = push && q.size() < 16;
        if (pop && q.size() > 0) void'(q.pop_front());
        if (acc_push) q.push_back(wr_data);
      end
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
