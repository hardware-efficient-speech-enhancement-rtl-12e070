// se_pkg: widths, sizes, fixed-point formats and shared types of the speech
// enhancement processor. Sizes that follow the source design: 25 ms frames of
// 400 samples at 16 kHz with 240 samples overlap (160-sample hop), a 64-channel
// gammatone filterbank, a 256-point radix-2^2 FFT, 15 AMS + 31 GFCC features,
// four hidden layers of 1024 sigmoid neurons and two 64-wide output heads.
// Fixed-point formats, the PE count and all config defaults are this design's
// own choices.
package se_pkg;
  // audio samples are signed Q1.15
  localparam int SAMPLE_W   = 16;
  // DNN activations and features are signed Q6.10
  localparam int ACT_W      = 16;
  localparam int ACT_FRAC   = 10;
  // filter coefficients and cosine tables are signed Q2.14
  localparam int COEF_FRAC  = 14;
  // noise levels, gamma and thresholds are unsigned Q1.15 (32768 = 1.0)
  localparam int LVL_W      = 16;

  localparam int FRAME_LEN  = 400;
  localparam int HOP        = 160;
  localparam int N_CH       = 64;
  localparam int N_SOS      = 4;
  localparam int FFT_N      = 256;
  localparam int N_AMS      = 15;
  localparam int N_GFCC     = 31;
  localparam int N_STATIC   = N_AMS + N_GFCC;        // 46
  localparam int N_FEAT     = 3 * N_STATIC + 1;      // 139: static, delta, delta-delta, noise level
  localparam int N_HID      = 1024;
  localparam int N_HLAYER   = 4;
  localparam int N_OUT      = 2 * N_CH;              // 64 mapping + 64 mask outputs
  localparam int NUM_PE     = 16;
  localparam int FIFO_DEPTH = 16;

  // enhancement mode chosen by the DNLS (switches S1/S2)
  typedef enum logic [1:0] {
    MODE_NONE  = 2'd0,   // no speech: frame not enhanced
    MODE_MAP   = 2'd1,   // Mode 1: mapping only
    MODE_MASK  = 2'd2,   // Mode 2: masking only
    MODE_JOINT = 2'd3    // Mode 3: mapping refined by the mask
  } se_mode_e;

  // run-time DNLS settings (values are found at training time)
  typedef struct packed {
    logic [LVL_W-1:0] phi_slow;   // recursive-average weight for stationary noise
    logic [LVL_W-1:0] phi_fast;   // recursive-average weight for non-stationary noise
    logic [LVL_W-1:0] stat_thr;   // |N_k - N'_{k-1}| above this selects phi_fast
    logic [LVL_W-1:0] gamma_gain; // gamma = gain * N' * |N' - N'_prev|, gain in Q8.8
    logic [LVL_W-1:0] thr_up;     // 0.85
    logic [LVL_W-1:0] thr_low;    // 0.15
    logic [LVL_W-1:0] vad_thr;    // N' at or above this marks a noise-only frame
  } dnls_cfg_t;

  localparam dnls_cfg_t DNLS_CFG_DEFAULT = '{
    phi_slow:   16'd3277,   // 0.1
    phi_fast:   16'd26214,  // 0.8
    stat_thr:   16'd3277,   // 0.1
    gamma_gain: 16'd2048,   // 8.0
    thr_up:     16'd27853,  // 0.85
    thr_low:    16'd4915,   // 0.15
    vad_thr:    16'd31130   // 0.95
  };

  function automatic logic signed [15:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767) return 16'sh7fff;
    else if (v < -64'sd32768) return 16'sh8000;
    else return v[15:0];
  endfunction
endpackage
