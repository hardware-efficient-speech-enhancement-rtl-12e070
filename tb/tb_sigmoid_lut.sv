// tb_sigmoid_lut: sweeps the input range and compares with the exact logistic
// function (real arithmetic); the table interpolation must stay within 3 LSB
// of Q6.10, and inputs beyond +-8 must saturate.
module tb_sigmoid_lut;
  import se_pkg::*;
  logic signed [15:0] x, y;
  int checks = 0, failures = 0;
  sigmoid_lut dut (.x, .y);
  initial begin
    for (int v = -32768; v < 32768; v += 7) begin
      real e;
      int  ei;
      x = 16'(v);
      #1;
      e  = 1024.0 / (1.0 + $exp(-real'(v) / 1024.0));
      ei = int'(e);
      checks++;
      if (y > ei + 3 || y < ei - 3) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d exp=%f", v, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
