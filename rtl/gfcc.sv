// gfcc: gammatone frequency cepstral coefficients and the noisy cochleagram.
// Each channel's filterbank output is squared and summed over one hop (160
// samples), which decimates the 16 kHz filter outputs to the 100 Hz frame rate.
// On hop the sums are latched and, channel by channel, compressed with an
// integer cube root (the loudness compression; a bit-serial search, one result
// bit per cycle) to give the cochleagram value r[c], emitted on coch_*. The root
// of the 34-bit clamped sum has 11 bits, so the top 5 bits of coch_data are always zero.
// A DCT over the 64 compressed values then gives the first NC coefficients
//   g[k] = (sum_n r[n] * cos(pi*(2n+1)*k/(2*CH))) >> (14 + 3),  k = 0..NC-1,
// one multiply-accumulate per cycle, emitted on feat_*; done pulses after the
// last one. The cosine comes from the 256-entry table cos256.hex,
// cos(2*pi*m/256) in Q2.14, at m = (2n+1)*k mod 256 (valid for CH = 64).
// Time per frame: CH*12 + NC*CH + small cycles (about 2.8k at defaults).
// Channel count, decimation to 100 Hz, cube-root compression and the 31-D DCT
// follow the source design; summing squares over the hop, the input scaling
// (sum >> 5), the 1/8 DCT scale and the Q6.10 output format are choices here.
module gfcc
  import se_pkg::*;
#(
  parameter int CH = N_CH,
  parameter int NC = N_GFCC
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fb_valid,
  input  logic [$clog2(CH)-1:0] fb_ch,
  input  logic signed [15:0] fb_data,
  input  logic               hop,
  output logic               coch_valid,
  output logic [$clog2(CH)-1:0] coch_ch,
  output logic signed [ACT_W-1:0] coch_data,
  output logic               feat_valid,
  output logic [4:0]         feat_idx,
  output logic signed [ACT_W-1:0] feat_data,
  output logic               done
);
  localparam int CW = $clog2(CH);
  logic [39:0] acc [CH];
  logic [39:0] eng [CH];
  logic [10:0] r   [CH];
  logic [15:0] cosr [256];
  initial $readmemh("rtl/cos256.hex", cosr);

  typedef enum logic [1:0] {G_IDLE, G_CBRT, G_DCT} gst_e;
  gst_e st;
  logic [CW-1:0] ch;
  logic [3:0]    bitn;
  logic [10:0]   root;
  logic [4:0]    k;
  logic signed [47:0] dacc;

  // accumulate squared outputs between hops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CH; i++) begin acc[i] <= '0; eng[i] <= '0; end
    end else if (hop) begin
      for (int i = 0; i < CH; i++) begin
        eng[i] <= acc[i];
        acc[i] <= '0;
      end
      if (fb_valid) acc[fb_ch] <= 40'(32'(fb_data) * 32'(fb_data));
    end else if (fb_valid) begin
      acc[fb_ch] <= acc[fb_ch] + 40'(32'(fb_data) * 32'(fb_data));
    end
  end

  // cube root search: try setting bit 'bitn' of the root
  logic [10:0] trial;
  logic [33:0] cube, v;
  assign v     = (eng[ch] >> 5) > 40'h3_ffff_ffff ? 34'h3_ffff_ffff : 34'(eng[ch] >> 5);
  assign trial = root | (11'd1 << bitn);
  assign cube  = 34'(trial) * 34'(trial) * 34'(trial);

  // DCT term
  logic [7:0] m;
  logic signed [31:0] term;
  assign m    = 8'((32'(ch) * 2 + 1) * 32'(k));
  assign term = $signed({1'b0, 5'd0, r[ch]}) * $signed(cosr[m]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; ch <= '0; bitn <= '0; root <= '0; k <= '0; dacc <= '0;
      coch_valid <= 1'b0; coch_ch <= '0; coch_data <= '0;
      feat_valid <= 1'b0; feat_idx <= '0; feat_data <= '0; done <= 1'b0;
      for (int i = 0; i < CH; i++) r[i] <= '0;
    end else begin
      coch_valid <= 1'b0; feat_valid <= 1'b0; done <= 1'b0;
      case (st)
        G_IDLE: if (hop) begin
          st <= G_CBRT; ch <= '0; bitn <= 4'd10; root <= '0;
        end
        G_CBRT: begin
          logic [10:0] nr;
          nr = (cube <= v) ? trial : root;
          if (bitn == 0) begin
            r[ch]      <= nr;
            coch_valid <= 1'b1;
            coch_ch    <= ch;
            coch_data  <= ACT_W'({5'd0, nr});
            root       <= '0;
            bitn       <= 4'd10;
            if (ch == CW'(CH - 1)) begin
              st <= G_DCT; ch <= '0; k <= '0; dacc <= '0;
            end else ch <= ch + 1'b1;
          end else begin
            root <= nr;
            bitn <= bitn - 1'b1;
          end
        end
        G_DCT: begin
          if (ch == CW'(CH - 1)) begin
            logic signed [47:0] tot;
            tot        = dacc + 48'(term);
            feat_valid <= 1'b1;
            feat_idx   <= k;
            feat_data  <= sat16(64'(tot >>> (COEF_FRAC + 3)));
            dacc       <= '0;
            ch         <= '0;
            if (k == 5'(NC - 1)) begin
              st <= G_IDLE; done <= 1'b1;
            end else k <= k + 1'b1;
          end else begin
            dacc <= dacc + 48'(term);
            ch   <= ch + 1'b1;
          end
        end
        default: st <= G_IDLE;
      endcase
    end
  end
endmodule
