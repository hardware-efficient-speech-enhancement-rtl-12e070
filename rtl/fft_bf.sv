// fft_bf: one single-path delay feedback butterfly of the radix-2^2 FFT.
// BF I (JMUL = 0) is a plain radix-2 butterfly; BF II (JMUL = 1) first
// multiplies the later input x(n+D) by -j when jsel is high, done by swapping real and
// imaginary parts and negating one (no multiplier).
// With sel low the input is pushed into the D-deep delay line and the delay
// line's head (a difference from the previous half block) is output; with sel
// high the head x(n) and input x(n+D) give x(n)+x(n+D) at the output and
// x(n)-x(n+D) into the delay line. Everything advances only on ce; the output
// is registered, so the butterfly adds D+1 beats of latency.
module fft_bf #(
  parameter int D    = 1,
  parameter int WD   = 26,
  parameter bit JMUL = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic                 sel,
  input  logic                 jsel,
  input  logic signed [WD-1:0] in_re, in_im,
  output logic signed [WD-1:0] out_re, out_im
);
  logic signed [WD-1:0] dl_re [D];
  logic signed [WD-1:0] dl_im [D];
  logic signed [WD-1:0] b_re, b_im, h_re, h_im, p_re, p_im, o_re, o_im;

  assign h_re = dl_re[D-1];
  assign h_im = dl_im[D-1];

  always_comb begin
    // -j * (re + j im) = im - j re
    if (JMUL && jsel && sel) begin b_re = in_im; b_im = -in_re; end
    else              begin b_re = in_re; b_im = in_im;  end
    if (sel) begin
      o_re = h_re + b_re; o_im = h_im + b_im;
      p_re = h_re - b_re; p_im = h_im - b_im;
    end else begin
      o_re = h_re;        o_im = h_im;
      p_re = b_re;        p_im = b_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0; out_im <= '0;
      for (int i = 0; i < D; i++) begin dl_re[i] <= '0; dl_im[i] <= '0; end
    end else if (ce) begin
      out_re <= o_re; out_im <= o_im;
      dl_re[0] <= p_re; dl_im[0] <= p_im;
      for (int i = 1; i < D; i++) begin dl_re[i] <= dl_re[i-1]; dl_im[i] <= dl_im[i-1]; end
    end
  end
endmodule
