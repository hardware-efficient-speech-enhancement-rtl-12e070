// tb_cordic_div: random dividends and divisors (0 <= num < den) over a wide
// range of magnitudes; checks the Q1.15 quotient against integer division
// within 2 LSB and the ITER+1 cycle latency from start to done.
module tb_cordic_div;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [47:0] num, den;
  logic [15:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cordic_div #(.W(48), .ITER(16)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; num = 0; den = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      longint d, n, expq;
      int cyc;
      d = (longint'($urandom) << ($urandom % 14)) + 1;
      n = longint'($urandom % 1000) * d / 1000;
      @(negedge clk);
      num = 48'(n); den = 48'(d); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      expq = (n << 15) / d;
      checks++;
      if (longint'(q) > expq + 2 || longint'(q) < expq - 2) begin
        failures++; $display("n=%0d d=%0d q=%0d exp=%0d", n, d, q, expq);
      end
      checks++;
      if (cyc != 17) begin failures++; $display("latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
