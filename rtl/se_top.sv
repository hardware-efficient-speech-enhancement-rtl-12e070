// se_top: the speech enhancement inference processor. 16 kHz samples enter on
// sample_*; every 160 samples a 400-sample frame is processed:
//   frame_buffer -> hann_window -> dnls      noise level N'_k, gamma, mode, VAD
//   frame_buffer -> ams                      15 AMS features (FFT based)
//   sample -> gammatone_fb -> gfcc           64-channel cochleagram, 31 GFCCs
//   feat_delta                               139-value DNN input vector
//   dnn_engine                               mapped cochleagram + ratio mask
//   enhance_mix                              mode 1/2/3 output, zero if no speech
// The controller here starts feature assembly once DNLS, AMS and GFCC have all
// finished a frame, runs the DNN only for speech frames (otherwise the frame
// goes straight to the mixer and is output as zeros), and drops a frame that
// completes while the previous one is still in the DNN (overrun pulse).
// Output per frame: CH enhanced cochleagram values on enh_*, then frame_done
// with the frame's mode, speech flag, noise level N'_k, N_k and gamma.
// Configuration: gammatone coefficients (gt_*), DNN weights/pointers/biases
// (ld_*), layer scales (zeta) and DNLS settings (dnls_cfg) are loaded by the
// host; nothing is preset. Samples must be at least 258 cycles apart
// (sample_ready low while the filterbank is busy); at 10 MHz a 16 kHz stream
// gives 625. Waveform resynthesis from the enhanced cochleagram is outside
// this block. Structure and data flow follow the source design's inference
// processor; the controller and the frame hand-over are choices here.
module se_top
  import se_pkg::*;
#(
  parameter int NIN    = N_FEAT,
  parameter int NH     = N_HID,
  parameter int NHL    = N_HLAYER,
  parameter int P      = NUM_PE,
  parameter int WDEPTH = 131072
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_valid,
  input  logic signed [15:0]      sample,
  output logic                    sample_ready,
  input  dnls_cfg_t               dnls_cfg,
  input  logic                    gt_we,
  input  logic [7:0]              gt_addr,
  input  logic [1:0]              gt_sel,
  input  logic signed [15:0]      gt_data,
  input  logic                    ld_we,
  input  logic [1:0]              ld_sel,
  input  logic [$clog2(P)-1:0]    ld_pe,
  input  logic [19:0]             ld_addr,
  input  logic [19:0]             ld_data,
  input  logic signed [15:0]      zeta [NHL+1],
  output logic                    enh_valid,
  output logic [5:0]              enh_ch,
  output logic signed [ACT_W-1:0] enh_data,
  output logic                    frame_done,
  output se_mode_e                frame_mode,
  output logic                    frame_speech,
  output logic [LVL_W-1:0]        frame_noise,
  output logic [LVL_W-1:0]        frame_nk,
  output logic [LVL_W-1:0]        frame_gamma,
  output logic                    dnn_stall,
  output logic                    overrun
);
  localparam int NMX = (NIN > NH ? NIN : NH) > N_OUT ? (NIN > NH ? NIN : NH) : N_OUT;
  localparam int AIW = $clog2(NMX);   // DNN input address width

  // framing
  logic hop, fr_valid;
  logic [8:0] fr_idx;
  logic signed [15:0] fr_data;
  frame_buffer u_fbuf (.clk, .rst_n, .in_valid(sample_valid), .in_data(sample),
    .hop, .out_valid(fr_valid), .out_idx(fr_idx), .out_data(fr_data));

  logic hw_valid;
  logic [8:0] hw_idx;
  logic signed [15:0] hw_data;
  hann_window u_hann (.clk, .rst_n, .in_valid(fr_valid), .in_idx(fr_idx), .in_data(fr_data),
    .out_valid(hw_valid), .out_idx(hw_idx), .out_data(hw_data));

  // noise level sensing
  logic dn_done, dn_speech;
  logic [LVL_W-1:0] dn_nk, dn_navg, dn_gamma;
  se_mode_e dn_mode;
  dnls u_dnls (.clk, .rst_n, .cfg(dnls_cfg), .in_valid(hw_valid), .in_idx(hw_idx), .in_data(hw_data),
    .done(dn_done), .n_k(dn_nk), .n_avg(dn_navg), .gamma(dn_gamma), .mode(dn_mode), .speech(dn_speech));

  // AMS features
  logic am_valid, am_done;
  logic [3:0] am_idx;
  logic signed [15:0] am_data;
  ams u_ams (.clk, .rst_n, .in_valid(fr_valid), .in_idx(fr_idx), .in_data(fr_data),
    .feat_valid(am_valid), .feat_idx(am_idx), .feat_data(am_data), .done(am_done));

  // gammatone filterbank and GFCC
  logic fb_valid;
  logic [5:0] fb_ch;
  logic signed [15:0] fb_data;
  gammatone_fb u_gt (.clk, .rst_n, .cfg_we(gt_we), .cfg_addr(gt_addr), .cfg_sel(gt_sel), .cfg_data(gt_data),
    .in_valid(sample_valid), .in_data(sample), .in_ready(sample_ready),
    .out_valid(fb_valid), .out_ch(fb_ch), .out_data(fb_data));

  logic co_valid, gf_valid, gf_done;
  logic [5:0] co_ch;
  logic [4:0] gf_idx;
  logic signed [15:0] co_data, gf_data;
  gfcc u_gfcc (.clk, .rst_n, .fb_valid, .fb_ch, .fb_data, .hop,
    .coch_valid(co_valid), .coch_ch(co_ch), .coch_data(co_data),
    .feat_valid(gf_valid), .feat_idx(gf_idx), .feat_data(gf_data), .done(gf_done));

  // frame controller
  typedef enum logic [1:0] {C_WAIT, C_FEAT, C_DNN, C_MIX} cst_e;
  cst_e cst;
  logic got_dn, got_am, got_gf, all_in;
  logic fd_go, fd_valid, fd_done;
  logic [7:0] fd_idx;
  logic signed [15:0] fd_data;
  logic dnn_start, dnn_busy, dnn_valid, dnn_done;
  logic [6:0] dnn_idx;
  logic signed [15:0] dnn_data;
  logic mix_go, mix_latch, mix_done;
  se_mode_e cur_mode;
  logic cur_speech;
  logic [LVL_W-1:0] cur_noise, cur_nk, cur_gamma;

  assign all_in = (got_dn || dn_done) && (got_am || am_done) && (got_gf || gf_done);

  feat_delta u_feat (.clk, .rst_n, .ams_we(am_valid), .ams_idx(am_idx), .ams_data(am_data),
    .gfcc_we(gf_valid), .gfcc_idx(gf_idx), .gfcc_data(gf_data), .noise(dn_navg), .go(fd_go),
    .out_valid(fd_valid), .out_idx(fd_idx), .out_data(fd_data), .done(fd_done));

  dnn_engine #(.NIN(NIN), .NH(NH), .NHL(NHL), .NO(N_OUT), .P(P), .FD(FIFO_DEPTH), .WDEPTH(WDEPTH)) u_dnn (
    .clk, .rst_n, .ld_we, .ld_sel, .ld_pe, .ld_addr, .ld_data, .zeta,
    .in_we(fd_valid), .in_addr(AIW'(fd_idx)), .in_data(fd_data), .start(dnn_start),
    .busy(dnn_busy), .stall(dnn_stall), .out_valid(dnn_valid), .out_idx(dnn_idx), .out_data(dnn_data),
    .done(dnn_done));

  enhance_mix u_mix (.clk, .rst_n, .coch_we(co_valid), .coch_ch(co_ch), .coch_data(co_data),
    .dnn_valid, .dnn_idx, .dnn_data, .mode(cur_mode), .speech(cur_speech), .latch(mix_latch), .go(mix_go),
    .out_valid(enh_valid), .out_ch(enh_ch), .out_data(enh_data), .done(mix_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_WAIT; got_dn <= 1'b0; got_am <= 1'b0; got_gf <= 1'b0;
      fd_go <= 1'b0; dnn_start <= 1'b0; mix_go <= 1'b0; mix_latch <= 1'b0;
      cur_mode <= MODE_NONE; cur_speech <= 1'b0; cur_noise <= '0; cur_nk <= '0; cur_gamma <= '0;
      frame_nk <= '0; frame_gamma <= '0;
      frame_done <= 1'b0; frame_mode <= MODE_NONE; frame_speech <= 1'b0; frame_noise <= '0;
      overrun <= 1'b0;
    end else begin
      fd_go <= 1'b0; dnn_start <= 1'b0; mix_go <= 1'b0; mix_latch <= 1'b0;
      frame_done <= 1'b0; overrun <= 1'b0;
      if (dn_done) got_dn <= 1'b1;
      if (am_done) got_am <= 1'b1;
      if (gf_done) got_gf <= 1'b1;
      if (all_in) begin
        got_dn <= 1'b0; got_am <= 1'b0; got_gf <= 1'b0;
        if (cst == C_WAIT) begin
          fd_go      <= 1'b1;
          mix_latch  <= 1'b1;
          cur_mode   <= dn_speech ? dn_mode : MODE_NONE;
          cur_speech <= dn_speech;
          cur_noise  <= dn_navg;
          cur_nk     <= dn_nk;
          cur_gamma  <= dn_gamma;
          cst        <= C_FEAT;
        end else begin
          overrun <= 1'b1;
        end
      end
      case (cst)
        C_FEAT: if (fd_done) begin
          if (cur_speech) begin dnn_start <= 1'b1; cst <= C_DNN; end
          else            begin mix_go <= 1'b1;    cst <= C_MIX; end
        end
        C_DNN: if (dnn_done) begin mix_go <= 1'b1; cst <= C_MIX; end
        C_MIX: if (mix_done) begin
          frame_done   <= 1'b1;
          frame_mode   <= cur_mode;
          frame_speech <= cur_speech;
          frame_noise  <= cur_noise;
          frame_nk     <= cur_nk;
          frame_gamma  <= cur_gamma;
          cst          <= C_WAIT;
        end
        default: ;
      endcase
    end
  end
endmodule
