// dnls: dynamic noise level sensing for the enhancement stage.
// For every windowed frame k (streamed, in_idx 0..FRAME-1) it accumulates the
// cross-correlation of the frame with the previous frame, R(j,j-1), and the
// energy of the previous frame, R(j-1,j-1), keeping the previous frame in a
// local memory. At the frame end (following the source design):
//   N_k   = 1 - R(j,j-1)/R(j-1,j-1)             (divide by CORDIC, clamp to 0..1)
//   N'_k  = phi*N_k + (1-phi)*N'_{k-1}
//   gamma = gain * N'_k * |N'_k - N'_{k-1}|      (clamped to 1.0)
//   mode  = MAP if gamma > thr_up, MASK if gamma < thr_low, JOINT otherwise
//   speech = N'_k < vad_thr  (high N' marks a noise-only frame)
// Choices made here: phi is phi_fast when |N_k - N'_{k-1}| > stat_thr and
// phi_slow otherwise; the first frame (no predecessor) gives N_k = 0; all
// levels are unsigned Q1.15. Results are valid from the done pulse until the
// next one, about ITER+8 cycles after the last sample of a frame.
module dnls
  import se_pkg::*;
#(
  parameter int FRAME = FRAME_LEN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  dnls_cfg_t                  cfg,
  input  logic                       in_valid,
  input  logic [8:0]                 in_idx,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       done,
  output logic [LVL_W-1:0]           n_k,      // N_k
  output logic [LVL_W-1:0]           n_avg,    // N'_k
  output logic [LVL_W-1:0]           gamma,
  output se_mode_e                   mode,
  output logic                       speech
);
  localparam int AW = 48;
  logic signed [SAMPLE_W-1:0] prev [FRAME];
  logic signed [AW-1:0] r_xy, r_yy;
  logic have_prev;
  logic [LVL_W-1:0] n_avg_prev;

  typedef enum logic [2:0] {S_ACC, S_DIV, S_WAIT, S_AVG, S_GAMMA} state_e;
  state_e st;

  logic        div_start, div_busy, div_done;
  logic [15:0] div_q;
  logic [AW-1:0] div_num, div_den;

  cordic_div #(.W(AW), .ITER(16)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  logic signed [31:0] prod_xy, prod_yy;
  assign prod_xy = 32'(in_data) * 32'(prev[in_idx]);
  assign prod_yy = 32'(prev[in_idx]) * 32'(prev[in_idx]);

  // recursive average and gamma arithmetic
  logic [LVL_W-1:0] diff_n, diff_avg, phi;
  logic signed [17:0] delta;
  logic signed [35:0] upd;
  logic [47:0] gprod;
  assign delta    = $signed({2'b0, n_k}) - $signed({2'b0, n_avg_prev});
  assign diff_n   = delta[17] ? LVL_W'(-delta) : LVL_W'(delta);
  assign phi      = (diff_n > cfg.stat_thr) ? cfg.phi_fast : cfg.phi_slow;
  assign upd      = 36'(delta) * $signed({1'b0, phi});
  assign diff_avg = (n_avg >= n_avg_prev) ? n_avg - n_avg_prev : n_avg_prev - n_avg;
  assign gprod    = (48'(n_avg) * 48'(diff_avg) >> 15) * 48'(cfg.gamma_gain) >> 8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_ACC; r_xy <= '0; r_yy <= '0; have_prev <= 1'b0;
      n_k <= '0; n_avg <= '0; n_avg_prev <= '0; gamma <= '0;
      mode <= MODE_MASK; speech <= 1'b0; done <= 1'b0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      case (st)
        S_ACC: if (in_valid) begin
          r_xy <= (in_idx == 0 ? '0 : r_xy) + AW'(prod_xy);
          r_yy <= (in_idx == 0 ? '0 : r_yy) + AW'(prod_yy);
          if (in_idx == 9'(FRAME - 1)) st <= S_DIV;
        end
        S_DIV: begin
          n_avg_prev <= n_avg;
          if (!have_prev || r_yy <= 0) begin
            n_k <= '0; st <= S_AVG;
          end else if (r_xy <= 0) begin
            n_k <= 16'd32768; st <= S_AVG;
          end else if (r_xy >= r_yy) begin
            n_k <= '0; st <= S_AVG;
          end else begin
            div_num <= r_xy; div_den <= r_yy; div_start <= 1'b1; st <= S_WAIT;
          end
          have_prev <= 1'b1;
        end
        S_WAIT: if (div_done) begin
          // q is Q1.15 of the ratio, below 1.0 here
          n_k <= 16'd32768 - {1'b0, div_q[14:0]};
          st  <= S_AVG;
        end
        S_AVG: begin
          n_avg <= LVL_W'($signed({2'b0, n_avg_prev}) + 18'(upd >>> 15));
          st    <= S_GAMMA;
        end
        S_GAMMA: begin
          gamma  <= (gprod > 48'd32768) ? 16'd32768 : LVL_W'(gprod);
          if (gprod > 48'(cfg.thr_up))       mode <= MODE_MAP;
          else if (gprod < 48'(cfg.thr_low)) mode <= MODE_MASK;
          else                               mode <= MODE_JOINT;
          speech <= (n_avg < cfg.vad_thr);
          done   <= 1'b1;
          st     <= S_ACC;
        end
        default: st <= S_ACC;
      endcase
    end
  end

  // the previous frame is replaced sample by sample as the new one arrives
  always_ff @(posedge clk) if (in_valid && st == S_ACC) prev[in_idx] <= in_data;
endmodule
