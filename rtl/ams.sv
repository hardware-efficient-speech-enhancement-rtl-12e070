// ams: amplitude modulation spectrogram features of one frame.
// 1. The 400-sample frame is full-wave rectified and decimated by 4 (the mean
//    of each group of four |x|), giving a 100-point envelope at 4 kHz.
// 2. The envelope is Hanning windowed (the 400-point window table read at
//    4i+2, i.e. a 100-point Hanning window sampled at its group centres),
//    zero padded to 256 points and transformed by the radix-2^2 FFT; the
//    FFT is flushed with zeros (768 feed beats per
//    frame, so every frame starts at FFT index 0).
// 3. Bin magnitudes are approximated by max(|re|,|im|) + min(|re|,|im|)/2 and
//    integrated by NB = 15 triangular windows whose centres are uniformly
//    spaced from bin 1 (15.6 Hz) to bin 25.6 (400 Hz), each reaching zero at
//    its neighbours' centres. feat_* emits the NB features (Q6.10, sum >> 18);
//    done pulses after the last.
// Time: FRAME + 3*256 + 28*NB + a few cycles after the frame starts.
// Rectification, decimation by 4, Hanning window, zero padding, FFT and 15
// triangular windows from 15.6 to 400 Hz follow the source design; the
// magnitude approximation, triangle shapes, window sampling and scaling are
// choices here.
module ams
  import se_pkg::*;
#(
  parameter int FRAME = FRAME_LEN,
  parameter int NB    = N_AMS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [8:0]                 in_idx,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       feat_valid,
  output logic [3:0]                 feat_idx,
  output logic signed [ACT_W-1:0]    feat_data,
  output logic                       done
);
  localparam int NFFT  = FFT_N;
  localparam int NENV  = FRAME / 4;
  localparam int NBIN  = 28;           // bins 0..27 cover all triangles
  localparam int STEP  = 450;          // centre spacing in bins, Q8 (24.6/14)
  localparam int FEED  = 3 * NFFT;      // multiple of NFFT keeps the FFT frame-aligned
  localparam int LN    = $clog2(NFFT);
  localparam int LATF  = (NFFT - 1) + 2 * (LN / 2) + (LN / 2 - 1);  // FFT latency

  // triangular weights, Q8
  function automatic int tri_w(int b, int k);
    int c, dst;
    c    = 256 + b * STEP;
    dst = (k * 256 > c) ? k * 256 - c : c - k * 256;
    return (dst >= STEP) ? 0 : ((STEP - dst) * 256) / STEP;
  endfunction

  logic [15:0] win [FRAME_LEN];
  initial $readmemh("rtl/hann400.hex", win);

  logic [15:0] env [NENV];
  logic [17:0] eacc;
  logic [23:0] mag [NBIN];

  typedef enum logic [1:0] {A_IN, A_FFT, A_TRI} ast_e;
  ast_e st;
  logic [9:0] beat;
  logic [3:0] b;
  logic [4:0] k;
  logic [39:0] tacc;

  // FFT feed
  logic        f_valid;
  logic signed [15:0] f_re;
  logic        o_valid;
  logic [7:0]  o_bin;
  logic signed [25:0] o_re, o_im;
  logic [32:0] wprod;
  assign wprod   = (beat < 10'(NENV)) ? 33'(env[beat[6:0]]) * 33'(win[4*beat[6:0]+2]) : '0;
  assign f_valid = (st == A_FFT);
  assign f_re    = 16'(wprod >> 15);

  fft_r22sdf #(.N(NFFT), .IW(16), .WD(26)) u_fft (
    .clk, .rst_n, .in_valid(f_valid), .in_re(f_re), .in_im(16'sd0),
    .out_valid(o_valid), .out_bin(o_bin), .out_re(o_re), .out_im(o_im));

  logic [25:0] ar, ai, mx, mn;
  assign ar = o_re[25] ? 26'(-o_re) : 26'(o_re);
  assign ai = o_im[25] ? 26'(-o_im) : 26'(o_im);
  assign mx = (ar > ai) ? ar : ai;
  assign mn = (ar > ai) ? ai : ar;

  logic [8:0] wgt;
  assign wgt = 9'(tri_w(int'(b), int'(k)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IN; eacc <= '0; beat <= '0; b <= '0; k <= '0; tacc <= '0;
      feat_valid <= 1'b0; feat_idx <= '0; feat_data <= '0; done <= 1'b0;
      for (int i = 0; i < NBIN; i++) mag[i] <= '0;
    end else begin
      feat_valid <= 1'b0; done <= 1'b0;
      case (st)
        A_IN: if (in_valid) begin
          logic [17:0] a;
          a = 18'(in_data[15] ? -32'(in_data) : 32'(in_data));
          if (in_idx[1:0] == 2'd3) begin
            env[in_idx[8:2]] <= 16'((eacc + a) >> 2);
            eacc <= '0;
          end else eacc <= eacc + a;
          if (in_idx == 9'(FRAME - 1)) begin st <= A_FFT; beat <= '0; end
        end
        A_FFT: begin
          beat <= beat + 1'b1;
          if (o_valid && beat >= 10'(LATF) && beat < 10'(LATF + NFFT) && o_bin < 8'(NBIN)) mag[o_bin[4:0]] <= 24'((mx + (mn >> 1)) >> 2);
          if (beat == 10'(FEED - 1)) begin st <= A_TRI; b <= '0; k <= '0; tacc <= '0; end
        end
        A_TRI: begin
          logic [39:0] t;
          t = tacc + 40'(wgt) * 40'(mag[k]);
          if (k == 5'(NBIN - 1)) begin
            feat_valid <= 1'b1;
            feat_idx   <= b;
            feat_data  <= sat16(64'(t >> 16));
            tacc <= '0; k <= '0;
            if (b == 4'(NB - 1)) begin st <= A_IN; done <= 1'b1; end
            else b <= b + 1'b1;
          end else begin
            tacc <= t; k <= k + 1'b1;
          end
        end
        default: st <= A_IN;
      endcase
    end
  end
endmodule
