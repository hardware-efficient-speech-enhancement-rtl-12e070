// tb_dnn_engine: a reduced network (10 inputs, 2 hidden layers of 32, 16
// outputs, 4 PEs, FIFOs of depth 4) with random ternary weights, scaling
// factors and biases. PE 0's rows are made much denser than the others so the
// broadcast stalls on its full FIFO while the other PEs run ahead. The
// weights are encoded here into per-PE sparse columns and loaded through the
// load port. Three input vectors are run; every output is compared with a
// reference computed here: integer sums, scaling, bias, and a sigmoid from an
// interpolated table of 1/(1+exp(-x)) (linear for the mapping half).
module tb_dnn_engine;
  import se_pkg::*;
  import tb_sparse_pkg::*;
  localparam int NIN = 10, NH = 32, NHL = 2, NO = 16, P = 4, FD = 4, WDEPTH = 2048;
  localparam int NL = NHL + 1;
  logic clk = 0, rst_n = 0;
  logic ld_we, in_we, start, busy, stall, out_valid, done;
  logic [1:0] ld_sel;
  logic [1:0] ld_pe;
  logic [19:0] ld_addr, ld_data;
  logic signed [15:0] zeta [NHL+1];
  logic [4:0] in_addr;
  logic signed [15:0] in_data, out_data;
  logic [3:0] out_idx;
  int checks = 0, failures = 0, stalls = 0, nout = 0;
  int W[NL][NH][NH];     // [layer][out][in]
  int B[NL][NH];
  int lut[65];
  int expo[NO];
  always #5 clk = ~clk;
  dnn_engine #(.NIN(NIN), .NH(NH), .NHL(NHL), .NO(NO), .P(P), .FD(FD), .WDEPTH(WDEPTH)) dut (.*);
  function automatic int sat(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : int'(v);
  endfunction
  function automatic int sigm(int x);
    int xs, idx, fr;
    xs = x + 8192;
    if (xs <= 0) return lut[0];
    if (xs >= 16384) return lut[64];
    idx = xs >> 8; fr = xs & 255;
    return lut[idx] + (((lut[idx + 1] - lut[idx]) * fr) >>> 8);
  endfunction
  function automatic int nin_of(int l);  return l == 0 ? NIN : NH; endfunction
  function automatic int nout_of(int l); return l == NHL ? NO : NH; endfunction
  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (stall) stalls++;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_data) != expo[out_idx] || int'(out_idx) != nout) begin
      failures++; if (failures < 10) $display("out %0d = %0d exp %0d", out_idx, out_data, expo[out_idx]);
    end
    nout++;
  end
  task automatic ld(int sel, int pe, int addr, int data);
    @(negedge clk); ld_we = 1; ld_sel = 2'(sel); ld_pe = 2'(pe); ld_addr = 20'(addr); ld_data = 20'(data);
  endtask
  initial begin
    int a[NH];
    for (int i = 0; i < 65; i++) lut[i] = int'($floor(1024.0 / (1.0 + $exp(8.0 - real'(i) / 4.0)) + 0.5));
    ld_we = 0; ld_sel = 0; ld_pe = 0; ld_addr = 0; ld_data = 0; in_we = 0; in_addr = 0; in_data = 0; start = 0;
    for (int l = 0; l < NL; l++) zeta[l] = 16'(4000 + 3000 * l);
    repeat (3) @(posedge clk); rst_n = 1;
    // weights
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < nout_of(l); r++) begin
        B[l][r] = int'($urandom % 1024) - 512;
        for (int c = 0; c < nin_of(l); c++)
          W[l][r][c] = (($urandom % 100) < ((r % P == 0) ? 80 : 15)) ? (($urandom % 2) ? 1 : -1) : 0;
      end
    for (int p = 0; p < P; p++) begin
      int addr, col;
      addr = 0; col = 0;
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < nin_of(l); c++) begin
          int rows[$];
          bit neg[$];
          bit [4:0] ents[$];
          rows.delete(); neg.delete(); ents.delete();
          for (int r = p; r < nout_of(l); r += P)
            if (W[l][r][c] != 0) begin rows.push_back(r / P); neg.push_back(W[l][r][c] < 0); end
          encode_column(rows, neg, ents);
          ld(1, p, col, addr);
          foreach (ents[i]) begin ld(0, p, addr, int'(ents[i])); addr++; end
          col++;
        end
      ld(1, p, col, addr);
    end
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < nout_of(l); r++) ld(2, 0, l * NH + r, B[l][r] & 16'hffff);
    @(negedge clk); ld_we = 0;
    for (int run = 0; run < 3; run++) begin
      for (int i = 0; i < NIN; i++) begin
        a[i] = int'($urandom % 4096) - 2048;
        @(negedge clk); in_we = 1; in_addr = 5'(i); in_data = 16'(a[i]);
      end
      @(negedge clk); in_we = 0;
      for (int l = 0; l < NL; l++) begin
        int y[NH];
        for (int r = 0; r < nout_of(l); r++) begin
          longint s;
          int pre;
          s = 0;
          for (int c = 0; c < nin_of(l); c++) s += longint'(W[l][r][c]) * a[c];
          pre = sat(((s * zeta[l] + 8192) >>> 14) + B[l][r]);
          y[r] = (l < NHL || r >= NO / 2) ? sigm(pre) : pre;
        end
        a = y;
      end
      for (int r = 0; r < NO; r++) expo[r] = a[r];
      nout = 0;
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (nout != NO) begin failures++; $display("outputs %0d", nout); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("broadcast never stalled"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
