// cordic_div: divider using linear-mode (vectoring) CORDIC, the method the
// source design uses for divisions. Computes q = num / den for
// 0 <= num < 2*den, den > 0, as an unsigned Q1.(ITER-1) fraction.
// Each cycle performs one micro-rotation: y <- y -+ x*2^-i, z <- z +- 2^-i,
// driving y to zero, so z converges to num/den. ITER iterations, one per
// cycle; start is accepted when busy is low, done pulses with q valid.
// Latency: ITER+1 cycles from start to done.
module cordic_div #(
  parameter int W    = 48,  // operand width
  parameter int ITER = 16   // iterations = result bits
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [W-1:0]    num,
  input  logic [W-1:0]    den,
  output logic            busy,
  output logic            done,
  output logic [ITER-1:0] q
);
  logic signed [W+1:0] x, y;
  logic signed [ITER+1:0] z;
  logic [$clog2(ITER+1)-1:0] i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; x <= '0; y <= '0; z <= '0; i <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x <= (W+2)'(den); y <= (W+2)'(num); z <= '0; i <= '0; busy <= 1'b1;
      end else if (busy) begin
        // weight of this step is 2^-i, i.e. 2^(ITER-1-i) in the Q1.(ITER-1) result
        if (y >= 0) begin
          y <= y - (x >>> i);
          z <= z + ((ITER+2)'(1) <<< (ITER-1-int'(i)));
        end else begin
          y <= y + (x >>> i);
          z <= z - ((ITER+2)'(1) <<< (ITER-1-int'(i)));
        end
        if (int'(i) == ITER-1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        i <= i + 1'b1;
      end
    end
  end
  // final correction: the non-restoring sequence can end one LSB high
  // or low; result is the last z, clamped to the unsigned range
  logic signed [ITER+1:0] z_fin;
  always_comb begin
    z_fin = z;
    if (z_fin < 0) z_fin = '0;
    if (z_fin > (ITER+2)'((1 << ITER) - 1)) z_fin = (ITER+2)'((1 << ITER) - 1);
  end
  assign q = z_fin[ITER-1:0];
endmodule
