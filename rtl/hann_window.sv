// hann_window: multiplies each sample of a streamed 400-sample frame by the
// Hanning window w[n] = 0.5 - 0.5*cos(2*pi*n/399), held as unsigned Q1.15 in
// hann400.hex (read by the sample index). One registered multiply: the output
// follows the input by one cycle, with the index and frame markers delayed to
// match. The window length follows the source design; the table format and
// rounding (round half up before the 15-bit shift) are choices here.
module hann_window
  import se_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [8:0]                 in_idx,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [8:0]                 out_idx,
  output logic signed [SAMPLE_W-1:0] out_data
);
  logic [15:0] win [FRAME_LEN];
  initial $readmemh("rtl/hann400.hex", win);

  logic signed [32:0] prod;
  assign prod = 33'(in_data) * $signed({1'b0, win[in_idx < 9'(FRAME_LEN) ? in_idx : 9'd0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_idx <= '0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      out_data  <= SAMPLE_W'((prod + 33'sd16384) >>> 15);
    end
  end
endmodule
