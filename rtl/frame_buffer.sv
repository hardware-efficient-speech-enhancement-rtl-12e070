// frame_buffer: the input data buffer. Incoming 16 kHz samples are written into
// a circular buffer of 512 words. Once FRAME_LEN samples have arrived, and then
// after every HOP further samples, the buffer streams the latest FRAME_LEN
// samples, oldest first, one per cycle (out_idx 0..FRAME_LEN-1), and pulses
// hop at the start of each frame. Frame length 400 and hop 160 (15 ms overlap)
// follow the source design; the circular buffer and streaming read are choices
// here. Streaming takes FRAME_LEN cycles and must end before HOP new samples
// arrive; a sample arriving during the stream is stored normally.
module frame_buffer
  import se_pkg::*;
#(
  parameter int FRAME = FRAME_LEN,
  parameter int HOPN  = HOP
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       hop,        // a new frame starts streaming
  output logic                       out_valid,
  output logic [8:0]                 out_idx,
  output logic signed [SAMPLE_W-1:0] out_data
);
  localparam int DEPTH = 512;
  logic signed [SAMPLE_W-1:0] mem [DEPTH];
  logic [8:0]  wr_ptr;       // next write position
  logic [8:0]  rd_ptr;
  logic [9:0]  fill;         // samples seen, saturates at FRAME
  logic [8:0]  since_hop;    // samples since the last frame
  logic        streaming;
  logic [8:0]  cnt;
  logic        start_frame;

  logic frame_due;
  assign frame_due   = in_valid &&
                       (((fill + 10'd1) == 10'(FRAME)) ||
                        (fill == 10'(FRAME) && (since_hop + 9'd1) == 9'(HOPN)));
  assign start_frame = frame_due && !streaming;

  always_ff @(posedge clk) if (in_valid) mem[wr_ptr] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; fill <= '0; since_hop <= '0;
      streaming <= 1'b0; cnt <= '0; hop <= 1'b0;
      out_valid <= 1'b0; out_idx <= '0; out_data <= '0;
    end else begin
      hop       <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid) begin
        wr_ptr <= wr_ptr + 9'd1;
        if (fill != 10'(FRAME)) fill <= fill + 10'd1;
        since_hop <= start_frame ? 9'd0 : since_hop + 9'd1;
      end
      if (start_frame) begin
        // the newest sample is being written this cycle at wr_ptr, so the
        // frame starts FRAME-1 positions before it
        rd_ptr    <= wr_ptr - 9'(FRAME - 1);
        streaming <= 1'b1;
        cnt       <= '0;
        hop       <= 1'b1;
      end else if (streaming) begin
        out_valid <= 1'b1;
        out_idx   <= cnt;
        out_data  <= mem[rd_ptr];
        rd_ptr    <= rd_ptr + 9'd1;
        cnt       <= cnt + 9'd1;
        if (cnt == 9'(FRAME - 1)) streaming <= 1'b0;
      end
    end
  end

  // a frame must finish streaming before the next one is due
  assert property (@(posedge clk) disable iff (!rst_n) !(frame_due && streaming));
endmodule
