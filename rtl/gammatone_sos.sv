// gammatone_sos: one second-order IIR section of the gammatone filterbank,
// with the resources of the source design: four 16x16-bit multipliers, two
// adders and two state flip-flops (w0 = w[n-1], w1 = w[n-2]).
//   w[n] = x[n] - A_N*w[n-1] - B_N*w[n-2]      (feedback, first adder)
//   y[n] = B*w[n]   + C*w[n-1]                 (feedforward, second adder)
// The section is time-multiplexed over all channels and stages: on load_ff the
// input sample, the four coefficients and the two internal variables of the
// next section are loaded into registers; y, and the new internal variables
// (w_new, w0) to be written back, then follow combinationally.
// Assignment of the four coefficient names to the two feedback and two
// feedforward taps, Q2.14 coefficients and saturation to 16 bits are choices
// here (the gammatone sections have a first-order numerator and a
// second-order denominator).
module gammatone_sos
  import se_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_ff,
  input  logic signed [15:0] x_in,
  input  logic signed [15:0] a_n_in, b_n_in, b_in, c_in,
  input  logic signed [15:0] w0_in, w1_in,
  output logic signed [15:0] y,
  output logic signed [15:0] w0_new,   // becomes w[n-1] next time
  output logic signed [15:0] w1_new    // becomes w[n-2] next time
);
  logic signed [15:0] x, a_n, b_n, b, c, w0, w1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; a_n <= '0; b_n <= '0; b <= '0; c <= '0; w0 <= '0; w1 <= '0;
    end else if (load_ff) begin
      x <= x_in; a_n <= a_n_in; b_n <= b_n_in; b <= b_in; c <= c_in;
      w0 <= w0_in; w1 <= w1_in;
    end
  end

  logic signed [31:0] m_a, m_b, m_y0, m_y1;
  logic signed [33:0] fb, ff;
  logic signed [15:0] w;
  always_comb begin
    m_a  = a_n * w0;
    m_b  = b_n * w1;
    fb   = (34'(x) <<< COEF_FRAC) - 34'(m_a) - 34'(m_b) + 34'sd8192;
    w    = sat16(64'(fb >>> COEF_FRAC));
    m_y0 = b * w;
    m_y1 = c * w0;
    ff   = 34'(m_y0) + 34'(m_y1) + 34'sd8192;
    y    = sat16(64'(ff >>> COEF_FRAC));
  end
  assign w0_new = w;
  assign w1_new = w0;
endmodule
