// gammatone_fb: the 64-channel gammatone filterbank, each channel a cascade of
// N_SOS second-order sections, all evaluated by a single gammatone_sos.
// Coefficients (A_N, B_N, B, C per section) and internal variables (w0, w1 per
// section) live in memories indexed by {channel, stage}; coefficients are
// written through the cfg port. For each input sample the controller walks all
// CH*N_SOS sections, one per cycle: in the cycle a section is loaded
// (load_ff) the previous section's new internal variables are written back and,
// after a channel's last stage, its output is emitted (out_valid, out_ch,
// out_data). A sample takes CH*N_SOS+1 cycles (257 at defaults, well within
// the 625 cycles per sample at 10 MHz); in_ready is low meanwhile.
// The cascade structure and memories follow the source design; the schedule
// and the coefficient write port are choices here. Gains are folded into the
// first stage's coefficients.
module gammatone_fb
  import se_pkg::*;
#(
  parameter int CH  = N_CH,
  parameter int NS  = N_SOS
) (
  input  logic               clk,
  input  logic               rst_n,
  // coefficient write: addr = {channel, stage}, sel 0..3 = A_N, B_N, B, C
  input  logic               cfg_we,
  input  logic [$clog2(CH*NS)-1:0] cfg_addr,
  input  logic [1:0]         cfg_sel,
  input  logic signed [15:0] cfg_data,
  input  logic               in_valid,
  input  logic signed [15:0] in_data,
  output logic               in_ready,
  output logic               out_valid,
  output logic [$clog2(CH)-1:0] out_ch,
  output logic signed [15:0] out_data
);
  localparam int NSEC = CH * NS;
  localparam int AW   = $clog2(NSEC);
  logic signed [15:0] coef [4][NSEC];
  logic signed [15:0] st0 [NSEC];
  logic signed [15:0] st1 [NSEC];

  logic              busy;
  logic [AW:0]       sec;       // section being loaded (== NSEC: write-back only)
  logic [AW-1:0]     prev_sec;  // section held in the SOS registers
  logic              prev_vld;
  logic signed [15:0] sample;

  logic signed [15:0] y, w0_new, w1_new, x_sel;
  logic               load;
  logic [AW-1:0]      sec_a;

  assign sec_a    = sec[AW-1:0];
  assign load     = busy && (sec != (AW+1)'(NSEC));
  assign x_sel    = (sec % (AW+1)'(NS) == 0) ? sample : y;
  assign in_ready = !busy;

  gammatone_sos u_sos (
    .clk, .rst_n, .load_ff(load), .x_in(x_sel),
    .a_n_in(coef[0][sec_a]), .b_n_in(coef[1][sec_a]), .b_in(coef[2][sec_a]), .c_in(coef[3][sec_a]),
    .w0_in(st0[sec_a]), .w1_in(st1[sec_a]),
    .y, .w0_new, .w1_new
  );

  always_ff @(posedge clk) begin
    if (cfg_we) coef[cfg_sel][cfg_addr] <= cfg_data;
  end

  // internal variables: cleared at reset, written back after each evaluation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSEC; i++) begin st0[i] <= '0; st1[i] <= '0; end
    end else if (prev_vld) begin
      st0[prev_sec] <= w0_new;
      st1[prev_sec] <= w1_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; sec <= '0; prev_sec <= '0; prev_vld <= 1'b0; sample <= '0;
      out_valid <= 1'b0; out_ch <= '0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      prev_vld  <= load;
      prev_sec  <= sec_a;
      if (prev_vld && (32'(prev_sec) % NS == NS - 1)) begin
        out_valid <= 1'b1;
        out_ch    <= $clog2(CH)'(32'(prev_sec) / NS);
        out_data  <= y;
      end
      if (!busy) begin
        if (in_valid) begin
          sample <= in_data; busy <= 1'b1; sec <= '0;
        end
      end else if (sec == (AW+1)'(NSEC)) begin
        busy <= 1'b0;
      end else begin
        sec <= sec + 1'b1;
      end
    end
  end
endmodule
