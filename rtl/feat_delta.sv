// feat_delta: assembles the DNN input vector of a frame. The 15 AMS and 31
// GFCC features arrive on two write ports (ams_*, gfcc_*) into a static
// vector of NS = 46 values. On go it streams, one per cycle, NS static
// features, their first time difference d = s_k - s_{k-1}, the second
// difference dd = d_k - d_{k-1}, and the DNLS noise level N'_k (converted
// from Q1.15 to Q6.10) as the last element: 3*NS+1 = 139 values on out_*
// (index and data, Q6.10), then pulses done and keeps s_k and d_k as history.
// History starts at zero after reset. Concatenating first- and second-order
// differences and the noise estimate follows the source design; plain
// one-frame differences and the vector order are choices here.
module feat_delta
  import se_pkg::*;
#(
  parameter int NA = N_AMS,
  parameter int NG = N_GFCC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ams_we,
  input  logic [3:0]              ams_idx,
  input  logic signed [ACT_W-1:0] ams_data,
  input  logic                    gfcc_we,
  input  logic [4:0]              gfcc_idx,
  input  logic signed [ACT_W-1:0] gfcc_data,
  input  logic [LVL_W-1:0]        noise,
  input  logic                    go,
  output logic                    out_valid,
  output logic [7:0]              out_idx,
  output logic signed [ACT_W-1:0] out_data,
  output logic                    done
);
  localparam int NS = NA + NG;
  localparam int NF = 3 * NS + 1;
  logic signed [ACT_W-1:0] cur [NS];
  logic signed [ACT_W-1:0] prv [NS];
  logic signed [ACT_W-1:0] prd [NS];
  logic        run;
  logic [7:0]  j;
  logic [5:0]  s;
  logic signed [ACT_W-1:0] d, dd;

  always_comb begin
    if (j < 8'(NS))          s = 6'(j);
    else if (j < 8'(2 * NS)) s = 6'(j - 8'(NS));
    else                     s = 6'(j - 8'(2 * NS));
  end
  assign d  = sat16(64'(cur[s]) - 64'(prv[s]));
  assign dd = sat16(64'(d) - 64'(prd[s]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; j <= '0; out_valid <= 1'b0; out_idx <= '0; out_data <= '0; done <= 1'b0;
      for (int i = 0; i < NS; i++) begin cur[i] <= '0; prv[i] <= '0; prd[i] <= '0; end
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      if (ams_we)  cur[6'(ams_idx)] <= ams_data;
      if (gfcc_we) cur[6'(NA) + 6'(gfcc_idx)] <= gfcc_data;
      if (!run) begin
        if (go) begin run <= 1'b1; j <= '0; end
      end else begin
        out_valid <= 1'b1;
        out_idx   <= j;
        if (j < 8'(NS))              out_data <= cur[s];
        else if (j < 8'(2 * NS))     out_data <= d;
        else if (j < 8'(3 * NS))     out_data <= dd;
        else                         out_data <= ACT_W'(noise >> 5);
        // history is updated once the value has been used for dd
        if (j >= 8'(2 * NS) && j < 8'(3 * NS)) begin
          prv[s] <= cur[s];
          prd[s] <= d;
        end
        j <= j + 1'b1;
        if (j == 8'(NF - 1)) begin run <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
