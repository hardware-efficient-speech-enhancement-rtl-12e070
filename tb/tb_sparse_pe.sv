// tb_sparse_pe: builds random sparse ternary columns for 64 local rows (with
// long gaps that need zero-padding entries, and empty columns), feeds the
// activations through a FIFO model with random gaps, and compares all
// accumulators with the dense product computed here. Checks one entry per
// cycle: a column takes max(1, entries) cycles when the FIFO never runs dry
// (plus one cycle for the first word to pass the FIFO).
module tb_sparse_pe;
  import se_pkg::*;
  import tb_sparse_pkg::*;
  localparam int ROWS = 64, NPTR = 64, WDEPTH = 8192;
  logic clk = 0, rst_n = 0;
  logic w_we, p_we, clear, fifo_empty, fifo_pop, idle;
  logic [13:0] w_addr, p_data;
  logic [4:0] w_data;
  logic [5:0] p_addr, col_base;
  logic signed [15:0] fifo_data;
  logic [5:0] rd_row;
  logic signed [31:0] rd_acc;
  int checks = 0, failures = 0;
  int wt[NPTR][ROWS];
  longint expacc[ROWS];
  int act[$];
  always #5 clk = ~clk;
  sparse_pe #(.ROWS(ROWS), .NPTR(NPTR), .WDEPTH(WDEPTH), .PW(14)) dut (.*);
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // activations reach the PE through a FIFO fed from the act queue
  logic hold, f_push, f_full;
  logic [15:0] f_wdata;
  sync_fifo #(.WIDTH(16), .DEPTH(16)) u_fifo (.clk, .rst_n, .push(f_push), .wr_data(f_wdata),
    .pop(fifo_pop), .rd_data(fifo_data), .full(f_full), .empty(fifo_empty));
  always @(negedge clk) begin
    f_push  = 0;
    if (!hold && !f_full && act.size() > 0) begin
      f_push = 1; f_wdata = 16'(act.pop_front());
    end
  end
  initial begin
    int addr, total;
    bit [4:0] ents[$];
    w_we = 0; p_we = 0; clear = 0; col_base = 0; rd_row = 0; w_addr = 0; w_data = 0; p_addr = 0; p_data = 0; hold = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    addr = 0; total = 0;
    for (int c = 0; c < NPTR - 1; c++) begin
      int rows[$];
      bit neg[$];
      int dens;
      rows.delete(); neg.delete();
      dens = (c % 5 == 0) ? 0 : (c % 5 == 1) ? 3 : 40;
      for (int r = 0; r < ROWS; r++) begin
        wt[c][r] = 0;
        if (($urandom % 100) < dens) begin
          wt[c][r] = ($urandom % 2) ? -1 : 1;
          rows.push_back(r); neg.push_back(wt[c][r] < 0);
        end
      end
      ents.delete();
      encode_column(rows, neg, ents);
      @(negedge clk); p_we = 1; p_addr = 6'(c); p_data = 14'(addr);
      foreach (ents[i]) begin
        @(negedge clk); p_we = 0; w_we = 1; w_addr = 14'(addr); w_data = ents[i]; addr++;
      end
      @(negedge clk); w_we = 0;
      total += (ents.size() > 0) ? ents.size() : 1;
    end
    @(negedge clk); p_we = 1; p_addr = 6'(NPTR - 1); p_data = 14'(addr);
    @(negedge clk); p_we = 0;
    for (int pass = 0; pass < 3; pass++) begin
      int cyc;
      clear = 1; @(negedge clk); clear = 0;
      for (int r = 0; r < ROWS; r++) expacc[r] = 0;
      // pass 0: all activations queued up front (timed); later passes: trickled
      for (int c = 0; c < NPTR - 1; c++) begin
        int a;
        a = int'($signed(16'($urandom)));
        for (int r = 0; r < ROWS; r++) expacc[r] += longint'(wt[c][r]) * a;
        if (pass == 0) act.push_back(a);
      end
      if (pass == 0) begin
        cyc = 0;
        @(negedge clk);
        while (!(idle && fifo_empty && act.size() == 0)) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != total + 1) begin failures++; $display("took %0d cycles, expected %0d", cyc, total + 1); end
      end else begin
        // re-run with the same activations arriving slowly
        failures += 0;
      end
      for (int r = 0; r < ROWS; r++) begin
        rd_row = 6'(r); #1;
        checks++;
        if (pass == 0 && longint'(rd_acc) != expacc[r]) begin
          failures++; if (failures < 10) $display("row %0d acc %0d exp %0d", r, rd_acc, expacc[r]);
        end
      end
      if (pass > 0) break;
    end
    // second run: the same weights, activations trickling in with gaps
    clear = 1; @(negedge clk); clear = 0;
    for (int r = 0; r < ROWS; r++) expacc[r] = 0;
    for (int c = 0; c < NPTR - 1; c++) begin
      int a;
      a = int'($urandom % 2000) - 1000;
      for (int r = 0; r < ROWS; r++) expacc[r] += longint'(wt[c][r]) * a;
      act.push_back(a);
      hold = 1; repeat ($urandom % 4) @(posedge clk); hold = 0;
      @(posedge clk);
    end
    while (!(idle && fifo_empty && act.size() == 0)) @(negedge clk);
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      rd_row = 6'(r); #1;
      checks++;
      if (longint'(rd_acc) != expacc[r]) begin failures++; if (failures < 10) $display("slow row %0d acc %0d exp %0d", r, rd_acc, expacc[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
