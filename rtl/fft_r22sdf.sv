// fft_r22sdf: N-point pipelined FFT with the radix-2^2 single-path delay
// feedback architecture: log4(N) stages, each a BF I and a BF II butterfly
// (delays N/2^(2s+1) and N/2^(2s+2)), with a complex twiddle multiplier
// between stages. Only every other radix-2 stage needs a real multiplier;
// the other one's twiddle is -j, done inside BF II.
// Streaming: one complex sample per ce beat (in_valid), natural order; the
// pipeline moves only on in_valid, so a frame is flushed by feeding the next
// frame or zeros. out_valid marks outputs; out_bin gives the frequency bin,
// the outputs appearing in bit-reversed order. Latency LAT beats
// (N-1 + 2*log4(N) + log4(N)-1; 266 at N = 256).
// The radix-2^2 method, log4(N) stages and BF I/BF II follow the source
// design; N = 256 is inferred from the 15.6 Hz spacing of the AMS features at
// the 4 kHz envelope rate. Twiddles come from cos256.hex (cos(2*pi*m/256),
// Q2.14); the data width (no scaling, WD bits) is a choice here.
module fft_r22sdf #(
  parameter int N    = 256,
  parameter int IW   = 16,
  parameter int WD   = IW + $clog2(N) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IW-1:0]  in_re, in_im,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_bin,
  output logic signed [WD-1:0]  out_re, out_im
);
  localparam int LN  = $clog2(N);
  localparam int S   = LN / 2;
  localparam int LAT = (N - 1) + 2 * S + (S - 1);

  logic [15:0] cosr [256];
  initial $readmemh("rtl/cos256.hex", cosr);

  logic [LN-1:0] g;         // beat counter, mod N
  logic [15:0]   primed;    // beats seen, saturating at LAT
  logic ce;
  assign ce = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin g <= '0; primed <= '0; end
    else if (ce) begin
      g <= g + 1'b1;
      if (primed != 16'(LAT)) primed <= primed + 1'b1;
    end
  end

  // latency in front of each element
  function automatic int lat_bf1(int s);
    int l = 0;
    for (int i = 0; i < s; i++) l += (N >> (2*i+1)) + 1 + (N >> (2*i+2)) + 1 + 1;
    return l;
  endfunction

  logic signed [WD-1:0] st_re [S+1];
  logic signed [WD-1:0] st_im [S+1];
  assign st_re[0] = WD'(in_re);
  assign st_im[0] = WD'(in_im);

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int D1 = N >> (2*s+1);
    localparam int D2 = N >> (2*s+2);
    localparam int L1 = lat_bf1(s);
    localparam int L2 = L1 + D1 + 1;
    localparam int LT = L2 + D2 + 1;
    logic [LN-1:0] i1, i2, it;
    logic signed [WD-1:0] a_re, a_im, b_re, b_im;
    assign i1 = g - LN'(L1);
    assign i2 = g - LN'(L2);
    assign it = g - LN'(LT);

    fft_bf #(.D(D1), .WD(WD), .JMUL(1'b0)) u_bf1 (
      .clk, .rst_n, .ce, .sel(i1[$clog2(D1)]), .jsel(1'b0),
      .in_re(st_re[s]), .in_im(st_im[s]), .out_re(a_re), .out_im(a_im));
    fft_bf #(.D(D2), .WD(WD), .JMUL(1'b1)) u_bf2 (
      .clk, .rst_n, .ce, .sel(i2[$clog2(D2)]), .jsel(i2[$clog2(D2)+1]),
      .in_re(a_re), .in_im(a_im), .out_re(b_re), .out_im(b_im));

    if (s < S - 1) begin : g_tw
      // twiddle W_N^(n3*(k1+2*k2)*4^s) for output index it of this stage
      localparam int NS = N >> (2*s);
      logic [LN-1:0] n3, kk, e;
      logic [7:0] ic, is;
      logic signed [WD+16:0] pr, pi;
      logic signed [15:0] c, d;
      always_comb begin
        n3 = it & LN'(NS/4 - 1);
        kk = LN'(it[$clog2(NS)-1]) + (LN'(it[$clog2(NS)-2]) << 1);
        e  = LN'(n3 * kk) << (2*s);
        ic = 8'(e) << (8 - LN);
        is = ic - 8'd64;
        c  = cosr[ic];
        d  = cosr[is];
        // (a + jb)(c - jd) = (ac + bd) + j(bc - ad)
        pr = (WD+17)'(b_re) * c + (WD+17)'(b_im) * d + (WD+17)'(8192);
        pi = (WD+17)'(b_im) * c - (WD+17)'(b_re) * d + (WD+17)'(8192);
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin st_re[s+1] <= '0; st_im[s+1] <= '0; end
        else if (ce) begin
          st_re[s+1] <= WD'(pr >>> 14);
          st_im[s+1] <= WD'(pi >>> 14);
        end
      end
    end else begin : g_last
      assign st_re[s+1] = b_re;
      assign st_im[s+1] = b_im;
    end
  end

  logic [LN-1:0] t_out;
  assign t_out = g - LN'(LAT);
  always_comb begin
    for (int b = 0; b < LN; b++) out_bin[b] = t_out[LN-1-b];
  end
  assign out_valid = ce && (primed == 16'(LAT));
  assign out_re    = st_re[S];
  assign out_im    = st_im[S];
endmodule
