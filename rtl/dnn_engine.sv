// dnn_engine: the deep learning unit. A fully connected feed-forward network,
// NIN inputs -> NHL hidden layers of NH sigmoid neurons -> NO outputs (the
// first NO/2 the mapping head, linear; the rest the mask head, sigmoid), with
// ternary weights stored as sparse columns in P sparse_pe processing elements.
// Per layer:
//   CLEAR  accumulators of all PEs are emptied
//   BCAST  the layer's input activations are pushed, in column order, into one
//          FIFO per PE (FD deep); a full FIFO stalls the broadcast (counted on
//          stall), while PEs with fewer non-zero weights run ahead
//   DRAIN  wait until every FIFO is empty and every PE idle
//   POST   for each neuron r: y = (acc_r * zeta_l) >> 14 + bias_r, then sigmoid
//          (LUT) or linear; written to the other activation buffer; for the
//          last layer also emitted on out_*.
// Inputs are written with in_we/in_addr/in_data before start; done pulses
// after the last output. Weights, column pointers and biases are written
// through ld_* (ld_sel 0: weight entry of PE ld_pe, 1: pointer of PE ld_pe,
// 2: bias, addressed by layer*NH + neuron).
// From the source design: four hidden layers of 1024, two output heads,
// ternary weights with a layer-wise scaling factor, sparse columns, FIFO load
// balancing and the sigmoid LUT. The input width NIN = 139 (46 static
// features, their deltas and delta-deltas, and the noise level), P = 16 PEs,
// Q6.10 activations, biases and the linear mapping head are choices here.
module dnn_engine
  import se_pkg::*;
#(
  parameter int NIN    = N_FEAT,
  parameter int NH     = N_HID,
  parameter int NHL    = N_HLAYER,
  parameter int NO     = N_OUT,
  parameter int P      = NUM_PE,
  parameter int FD     = FIFO_DEPTH,
  parameter int WDEPTH = 131072
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ld_we,
  input  logic [1:0]              ld_sel,
  input  logic [$clog2(P)-1:0]    ld_pe,
  input  logic [19:0]             ld_addr,
  input  logic [19:0]             ld_data,
  input  logic signed [15:0]      zeta [NHL+1],   // layer scaling factors, Q2.14
  input  logic                    in_we,
  input  logic [$clog2((NIN > NH ? NIN : NH) > NO ? (NIN > NH ? NIN : NH) : NO)-1:0] in_addr,
  input  logic signed [ACT_W-1:0] in_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    stall,
  output logic                    out_valid,
  output logic [$clog2(NO)-1:0]   out_idx,
  output logic signed [ACT_W-1:0] out_data,
  output logic                    done
);
  localparam int NPTR = NIN + NHL * NH + 1;
  localparam int ROWS = ((NH > NO ? NH : NO) + P - 1) / P;
  localparam int PB   = $clog2(P);
  localparam int RB   = $clog2(ROWS);
  localparam int CB   = $clog2(NPTR);
  localparam int PW   = $clog2(WDEPTH + 1);
  localparam int NB   = NHL * NH + NO;
  localparam int NM   = (NIN > NH ? NIN : NH) > NO ? (NIN > NH ? NIN : NH) : NO;  // widest layer
  localparam int AB   = $clog2(NM);
  localparam int LB   = $clog2(NHL + 1);

  logic signed [ACT_W-1:0] act_a [NM];
  logic signed [ACT_W-1:0] act_b [NM];
  logic signed [ACT_W-1:0] bias  [NB];

  typedef enum logic [2:0] {E_IDLE, E_CLR, E_BC, E_DRAIN, E_POST} est_e;
  est_e st;
  logic [LB-1:0] layer;
  logic [AB:0]   c;      // broadcast column
  logic [AB:0]   r;      // post-processing neuron
  logic [AB:0]   nin_l, nout_l;
  logic [CB-1:0] cbase;
  logic          last_l;

  assign last_l = (layer == LB'(NHL));
  assign nin_l  = (layer == 0) ? (AB+1)'(NIN) : (AB+1)'(NH);
  assign nout_l = last_l ? (AB+1)'(NO) : (AB+1)'(NH);
  assign cbase  = (layer == 0) ? '0 : CB'(NIN + (int'(layer) - 1) * NH);

  // PE array
  logic [P-1:0] f_full, f_empty, f_pop, pe_idle;
  logic signed [ACT_W-1:0] f_data [P];
  logic signed [31:0]      pe_acc [P];
  logic push;
  logic signed [ACT_W-1:0] bc_data;
  assign bc_data = layer[0] ? act_b[c[AB-1:0]] : act_a[c[AB-1:0]];
  assign push    = (st == E_BC) && (f_full == '0);
  assign stall   = (st == E_BC) && (f_full != '0);

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic [15:0] fd;
    sync_fifo #(.WIDTH(ACT_W), .DEPTH(FD)) u_fifo (
      .clk, .rst_n, .push, .wr_data(bc_data), .pop(f_pop[p]),
      .rd_data(fd), .full(f_full[p]), .empty(f_empty[p]));
    assign f_data[p] = fd;
    sparse_pe #(.ROWS(ROWS), .NPTR(NPTR), .WDEPTH(WDEPTH), .PW(PW)) u_pe (
      .clk, .rst_n,
      .w_we(ld_we && ld_sel == 2'd0 && ld_pe == PB'(p)), .w_addr(PW'(ld_addr)), .w_data(ld_data[4:0]),
      .p_we(ld_we && ld_sel == 2'd1 && ld_pe == PB'(p)), .p_addr(CB'(ld_addr)), .p_data(PW'(ld_data)),
      .clear(st == E_CLR), .col_base(cbase),
      .fifo_empty(f_empty[p]), .fifo_data(f_data[p]), .fifo_pop(f_pop[p]), .idle(pe_idle[p]),
      .rd_row(RB'(r >> PB)), .rd_acc(pe_acc[p]));
  end

  // post-processing of neuron r
  logic signed [31:0] acc_r;
  logic signed [47:0] scaled;
  logic signed [ACT_W-1:0] pre, sig, act;
  logic use_sig;
  assign acc_r   = pe_acc[r[PB-1:0]];
  assign scaled  = (48'(acc_r) * 48'(zeta[layer]) + 48'sd8192) >>> 14;
  assign pre     = sat16(64'(scaled) + 64'(bias[int'(layer) * NH + int'(r)]));
  assign use_sig = !last_l || (r >= (AB+1)'(NO / 2));
  assign act     = use_sig ? sig : pre;
  sigmoid_lut u_sig (.x(pre), .y(sig));

  always_ff @(posedge clk) begin
    if (ld_we && ld_sel == 2'd2) bias[ld_addr[$clog2(NB)-1:0]] <= ld_data[15:0];
    if (st == E_IDLE && in_we) act_a[in_addr] <= in_data;
    if (st == E_POST) begin
      if (layer[0]) act_a[r[AB-1:0]] <= act;
      else          act_b[r[AB-1:0]] <= act;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; layer <= '0; c <= '0; r <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_data <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0; done <= 1'b0;
      case (st)
        E_IDLE: if (start) begin layer <= '0; st <= E_CLR; end
        E_CLR:  begin c <= '0; st <= E_BC; end
        E_BC:   if (push) begin
          c <= c + 1'b1;
          if (c == nin_l - 1'b1) st <= E_DRAIN;
        end
        E_DRAIN: if (f_empty == '1 && pe_idle == '1) begin r <= '0; st <= E_POST; end
        E_POST: begin
          if (last_l) begin
            out_valid <= 1'b1;
            out_idx   <= $clog2(NO)'(r);
            out_data  <= act;
          end
          r <= r + 1'b1;
          if (r == nout_l - 1'b1) begin
            if (last_l) begin st <= E_IDLE; done <= 1'b1; end
            else begin layer <= layer + 1'b1; st <= E_CLR; end
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end
  assign busy = (st != E_IDLE);
endmodule
