// tb_gammatone_sos: drives random inputs, coefficients and internal variables
// and compares y and the write-back values with the section equations
//   w = sat(x - (A_N*w0 + B_N*w1)/2^14),  y = sat((B*w + C*w0)/2^14)
// (rounded), computed here in plain integer arithmetic; then runs one section
// as a filter over 300 samples, feeding its write-back state back in.
module tb_gammatone_sos;
  logic clk = 0, rst_n = 0, load_ff;
  logic signed [15:0] x_in, a_n_in, b_n_in, b_in, c_in, w0_in, w1_in, y, w0_new, w1_new;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gammatone_sos dut (.*);
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  task automatic check(int x, int a, int bn, int b, int c, int w0, int w1);
    int w, ye;
    w  = sat((((longint'(x) <<< 14) - longint'(a) * w0 - longint'(bn) * w1 + 8192) >>> 14));
    ye = sat(((longint'(b) * w + longint'(c) * w0 + 8192) >>> 14));
    checks++;
    if (y != 16'(ye) || w0_new != 16'(w) || w1_new != 16'(w0)) begin
      failures++;
      if (failures < 10) $display("x=%0d y=%0d exp %0d w=%0d exp %0d", x, y, ye, w0_new, w);
    end
  endtask
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int s0, s1;
    load_ff = 0; {x_in, a_n_in, b_n_in, b_in, c_in, w0_in, w1_in} = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      {x_in, a_n_in, b_n_in, b_in, c_in, w0_in, w1_in} = {$urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 0) begin x_in = x_in >>> 4; w0_in = w0_in >>> 4; w1_in = w1_in >>> 4; end
      load_ff = 1;
      @(negedge clk); load_ff = 0;
      // inputs change while not loading: outputs must not follow them
      x_in = 16'($urandom);
      #1 check(int'(dut.x), int'(dut.a_n), int'(dut.b_n), int'(dut.b), int'(dut.c), int'(dut.w0), int'(dut.w1));
    end
    // a resonator: a1 = -1.8, a2 = 0.9, b0 = 0.1, b1 = -0.1
    s0 = 0; s1 = 0;
    for (int n = 0; n < 300; n++) begin
      int xs, w, ye;
      xs = (n % 40 < 20) ? 3000 : -3000;
      @(negedge clk);
      x_in = 16'(xs); a_n_in = -16'sd29491; b_n_in = 16'sd14746; b_in = 16'sd1638; c_in = -16'sd1638;
      w0_in = 16'(s0); w1_in = 16'(s1); load_ff = 1;
      @(negedge clk); load_ff = 0;
      w  = sat((((longint'(xs) <<< 14) + 29491 * longint'(s0) - 14746 * longint'(s1) + 8192) >>> 14));
      ye = sat(((1638 * longint'(w) - 1638 * longint'(s0) + 8192) >>> 14));
      checks++;
      if (y != 16'(ye)) begin failures++; if (failures < 10) $display("n=%0d y=%0d exp %0d", n, y, ye); end
      s1 = s0; s0 = w;
      s0 = int'(w0_new); s1 = int'(w1_new);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
