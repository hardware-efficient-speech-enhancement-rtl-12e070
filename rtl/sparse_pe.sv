// sparse_pe: one processing element of the DNN array. It owns every P-th
// output neuron of a layer (rows r with r mod P = its index, held at local row
// r / P) and stores only the non-zero ternary weights of those rows, in
// compressed sparse column form (as in the source design):
//   wmem entry = {sign, rel[3:0]}  sign 0 = +1, 1 = -1 (scale applied later)
//   rel 1..15  the row advances by rel from the previous entry of the column
//              (the first entry of a column counts from row -1)
//   rel 0      zero-padding entry: the row advances by 15, nothing is added
//   ptr[col]   address of the column's first entry; the column ends where
//              ptr[col+1] begins (layers are stored one after the other).
// The PE pops one input activation at a time from its FIFO (columns in order),
// walks that column's entries one per cycle and adds +x or -x to the addressed
// accumulator, so its speed depends only on its own non-zero count. Popping the
// next activation overlaps the last entry of a column, so a column costs
// max(1, entries) cycles. clear empties the accumulators (valid bits) and
// restarts the column count. rd_row/rd_acc read an accumulator for the
// post-processing. The 1+4-bit entry, relative index, zero padding and column
// pointer follow the source design; the row interleaving across PEs, the
// meaning of rel = 0 and the one-entry-per-cycle schedule are choices here.
module sparse_pe
  import se_pkg::*;
#(
  parameter int ROWS   = N_HID / NUM_PE,        // local rows
  parameter int NPTR   = N_FEAT + N_HLAYER * N_HID + 1,
  parameter int WDEPTH = 131072,
  parameter int PW     = $clog2(WDEPTH + 1)     // pointer width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // weight and pointer loading
  input  logic                     w_we,
  input  logic [PW-1:0]            w_addr,
  input  logic [4:0]               w_data,
  input  logic                     p_we,
  input  logic [$clog2(NPTR)-1:0]  p_addr,
  input  logic [PW-1:0]            p_data,
  // layer control
  input  logic                     clear,
  input  logic [$clog2(NPTR)-1:0]  col_base,
  // activation FIFO (first-word fall-through)
  input  logic                     fifo_empty,
  input  logic signed [ACT_W-1:0]  fifo_data,
  output logic                     fifo_pop,
  output logic                     idle,
  // accumulator read-out
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  output logic signed [31:0]       rd_acc
);
  localparam int CW = $clog2(NPTR);
  logic [4:0]    wmem [WDEPTH];
  logic [PW-1:0] ptr  [NPTR];
  logic signed [31:0] acc [ROWS];
  logic [ROWS-1:0]    acc_vld;

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_addr[$clog2(WDEPTH)-1:0]] <= w_data;
    if (p_we) ptr[p_addr]  <= p_data;
  end

  logic          running;
  logic [CW-1:0] col;
  logic [PW-1:0] addr, endp;
  logic signed [15:0] row;
  logic signed [ACT_W-1:0] x;

  logic [4:0]  ent;
  logic signed [15:0] nrow;
  logic        last, fetch;
  logic [CW-1:0] cidx;
  assign ent   = wmem[addr[$clog2(WDEPTH)-1:0]];
  assign nrow  = row + ((ent[3:0] == 4'd0) ? 16'sd15 : 16'($unsigned(ent[3:0])));
  assign last  = !running || (addr == endp) || (addr + 1'b1 == endp);
  assign fetch = last && !fifo_empty && !clear;
  assign fifo_pop = fetch;
  assign idle  = !running;
  assign cidx  = col_base + col;
  assign rd_acc = acc_vld[rd_row] ? acc[rd_row] : 32'sd0;

  logic [$clog2(ROWS)-1:0] lrow;
  assign lrow = nrow[$clog2(ROWS)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; col <= '0; addr <= '0; endp <= '0; row <= '0; x <= '0;
      acc_vld <= '0;
    end else if (clear) begin
      running <= 1'b0; col <= '0; acc_vld <= '0;
    end else begin
      // process the entry at addr
      if (running && addr != endp) begin
        row  <= nrow;
        addr <= addr + 1'b1;
        if (ent[3:0] != 4'd0) begin
          acc_vld[lrow] <= 1'b1;
          acc[lrow] <= (acc_vld[lrow] ? acc[lrow] : 32'sd0) +
                       (ent[4] ? -32'(x) : 32'(x));
        end
      end
      // take the next column
      if (fetch) begin
        x       <= fifo_data;
        addr    <= ptr[cidx];
        endp    <= ptr[cidx + 1'b1];
        row     <= -16'sd1;
        col     <= col + 1'b1;
        running <= 1'b1;
      end else if (last) begin
        running <= 1'b0;
      end
    end
  end

  // every real entry must land inside the PE's rows
  always_ff @(posedge clk)
    if (rst_n && !clear && running && addr != endp && ent[3:0] != 4'd0)
      assert (nrow >= 0 && nrow < 16'(ROWS)) else $error("sparse_pe: weight row %0d out of range", nrow);
endmodule
