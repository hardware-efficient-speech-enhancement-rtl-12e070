// enhance_mix: the switches S1/S2 and the SVAD switch at the DNN output.
// Collects the DNN outputs of a frame (index < CH: mapped cochleagram,
// index >= CH: ratio mask, both Q6.10) and the noisy cochleagram (coch_*).
// On go it latches the mode and speech flag and emits CH enhanced cochleagram
// values, one per cycle, on out_*:
//   MODE_MAP   (Mode 1)  out = map
//   MODE_MASK  (Mode 2)  out = noisy * mask
//   MODE_JOINT (Mode 3)  out = map * mask   (mapping refined by the mask)
//   no speech            out = 0           (noise-only frame suppressed)
// The noisy cochleagram is staged: values written on coch_* are copied for use
// on latch, so the next frame's values can arrive while the DNN still runs. The three modes follow the source design; zero output
// for noise-only frames and the Q6.10 products are choices here.
module enhance_mix
  import se_pkg::*;
#(
  parameter int CH = N_CH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coch_we,
  input  logic [$clog2(CH)-1:0]   coch_ch,
  input  logic signed [ACT_W-1:0] coch_data,
  input  logic                    dnn_valid,
  input  logic [$clog2(2*CH)-1:0] dnn_idx,
  input  logic signed [ACT_W-1:0] dnn_data,
  input  se_mode_e                mode,
  input  logic                    speech,
  input  logic                    latch,
  input  logic                    go,
  output logic                    out_valid,
  output logic [$clog2(CH)-1:0]   out_ch,
  output logic signed [ACT_W-1:0] out_data,
  output logic                    done
);
  localparam int CW = $clog2(CH);
  logic signed [ACT_W-1:0] stage [CH];
  logic signed [ACT_W-1:0] noisy [CH];
  logic signed [ACT_W-1:0] map   [CH];
  logic signed [ACT_W-1:0] mask  [CH];
  se_mode_e m;
  logic     sp, run;
  logic [CW-1:0] c;
  logic signed [31:0] prod;
  logic signed [ACT_W-1:0] v;

  always_comb begin
    prod = '0;
    v    = '0;
    if (sp) begin
      case (m)
        MODE_MAP:   v = map[c];
        MODE_MASK:  begin prod = 32'(noisy[c]) * 32'(mask[c]); v = sat16(64'(prod >>> ACT_FRAC)); end
        MODE_JOINT: begin prod = 32'(map[c]) * 32'(mask[c]);   v = sat16(64'(prod >>> ACT_FRAC)); end
        default:    v = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (coch_we) stage[coch_ch] <= coch_data;
    if (dnn_valid) begin
      if (dnn_idx < ($clog2(2*CH))'(CH)) map[CW'(dnn_idx)] <= dnn_data;
      else                               mask[CW'(dnn_idx - ($clog2(2*CH))'(CH))] <= dnn_data;
    end
    if (latch) for (int i = 0; i < CH; i++) noisy[i] <= stage[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m <= MODE_NONE; sp <= 1'b0; run <= 1'b0; c <= '0;
      out_valid <= 1'b0; out_ch <= '0; out_data <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      if (!run) begin
        if (go) begin run <= 1'b1; c <= '0; m <= mode; sp <= speech; end
      end else begin
        out_valid <= 1'b1;
        out_ch    <= c;
        out_data  <= v;
        c <= c + 1'b1;
        if (c == CW'(CH - 1)) begin run <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
