// tb_se_top: end-to-end test of the speech enhancement processor at a reduced
// network size (two hidden layers of 256 neurons, two PEs). It loads a
// stable random gammatone filterbank, a random ternary network (dense in PE 0,
// sparse in PE 1, so PE 0's FIFO fills and the broadcast stalls, and so dense
// that one speech frame's inference outlasts a hop and the next frame is
// dropped as an overrun), and then streams 12 frames of a tone plus noise of
// changing level, one sample whenever sample_ready allows.
// The DNLS thresholds are rewritten at every hop to force, frame by frame,
// noise-only frames, and MASK, JOINT and MAP mode. Checked:
//  - the DNLS decision (speech flag, and the mode where the thresholds fix it)
//  - every DNN output against a reference network computed here from the
//    feature vector the DUT fed to it (ternary weights, zeta scaling, bias,
//    the sigmoid table formula 1024/(1+exp(-x)) sampled every 0.25)
//  - every enhanced value against the mode rule applied to the captured noisy
//    cochleagram and DNN outputs
//  - that MAP, MASK, JOINT, noise-only frames, broadcast stalls and overruns
//    each happened at least once.
module tb_se_top;
  import se_pkg::*;
  import tb_sparse_pkg::*;
  localparam int NIN = N_FEAT, NH = 256, NHL = 2, P = 2, WD = 65536;
  localparam int NL = NHL + 1, NO = N_OUT, NFR = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample_valid, sample_ready;
  logic signed [15:0] sample;
  dnls_cfg_t cfg;
  logic gt_we; logic [7:0] gt_addr; logic [1:0] gt_sel; logic signed [15:0] gt_data;
  logic ld_we; logic [1:0] ld_sel; logic [0:0] ld_pe; logic [19:0] ld_addr, ld_data;
  logic signed [15:0] zeta [NL];
  logic enh_valid; logic [5:0] enh_ch; logic signed [15:0] enh_data;
  logic frame_done, frame_speech, dnn_stall, overrun;
  se_mode_e frame_mode;
  logic [15:0] frame_noise, frame_nk, frame_gamma;

  se_top #(.NIN(NIN), .NH(NH), .NHL(NHL), .P(P), .WDEPTH(WD)) dut (
    .clk, .rst_n, .sample_valid, .sample, .sample_ready, .dnls_cfg(cfg),
    .gt_we, .gt_addr, .gt_sel, .gt_data, .ld_we, .ld_sel, .ld_pe, .ld_addr, .ld_data, .zeta,
    .enh_valid, .enh_ch, .enh_data, .frame_done, .frame_mode, .frame_speech, .frame_noise, .frame_nk, .frame_gamma,
    .dnn_stall, .overrun);

  int checks = 0, failures = 0;
  byte W [NL][NH][NH];      // [layer][out][in]
  int  B [NL][NH];
  int  lut [65];
  int  feat [NIN];
  int  exp_dnn [NO], got_dnn [NO], exp_enh [N_CH];
  int  stage [N_CH], noisy [N_CH];
  int  n_stall = 0, n_over = 0, n_map = 0, n_mask = 0, n_joint = 0, n_quiet = 0, n_frames = 0;
  int  n_dnn = 0, n_enh = 0, hops = 0;

  function automatic int sat(longint v);
    return v > 32767 ? 32767 : v < -32768 ? -32768 : int'(v);
  endfunction
  function automatic int sigm(int x);
    int xs, idx, fr;
    xs = x + 8192;
    if (xs <= 0) return lut[0];
    if (xs >= 16384) return lut[64];
    idx = xs >> 8; fr = xs & 255;
    return lut[idx] + (((lut[idx + 1] - lut[idx]) * fr) >>> 8);
  endfunction
  function automatic int nin_of(int l);  return l == 0 ? NIN : NH; endfunction
  function automatic int nout_of(int l); return l == NHL ? NO : NH; endfunction

  // DNLS thresholds per frame: even frames noise-only (a frame following a
  // speech frame is dropped anyway), odd frames MASK, JOINT, MAP in turn
  function automatic dnls_cfg_t cfg_of(int f);
    dnls_cfg_t c;
    c = DNLS_CFG_DEFAULT;
    c.vad_thr = 16'hffff;
    case (f % 6)
      0, 2, 4: c.vad_thr = 16'd0;
      1: begin c.thr_up = 16'hffff; c.thr_low = 16'hffff; end
      3: begin c.thr_up = 16'hffff; c.thr_low = 16'd0; end
      default: begin c.thr_up = 16'd0; c.thr_low = 16'd0; end
    endcase
    return c;
  endfunction

  task automatic reference();
    int a [NH], y [NH];
    foreach (a[i]) a[i] = 0;
    for (int i = 0; i < NIN; i++) a[i] = feat[i];
    for (int l = 0; l < NL; l++) begin
      for (int r = 0; r < nout_of(l); r++) begin
        longint s;
        int pre;
        s = 0;
        for (int c = 0; c < nin_of(l); c++) s += longint'(W[l][r][c]) * a[c];
        pre = sat(((s * zeta[l] + 8192) >>> 14) + B[l][r]);
        y[r] = (l < NHL || r >= NO / 2) ? sigm(pre) : pre;
      end
      a = y;
    end
    for (int r = 0; r < NO; r++) exp_dnn[r] = a[r];
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors, in a fixed order within each clock edge
  always @(posedge clk) if (rst_n) begin
    if (dut.dnn_valid) begin
      checks++; n_dnn++;
      got_dnn[dut.dnn_idx] = int'(dut.dnn_data);
      if (int'(dut.dnn_data) != exp_dnn[dut.dnn_idx]) begin
        failures++;
        if (failures < 10) $display("dnn out %0d = %0d exp %0d", dut.dnn_idx, dut.dnn_data, exp_dnn[dut.dnn_idx]);
      end
    end
    if (enh_valid) begin
      checks++; n_enh++;
      if (int'(enh_data) != exp_enh[enh_ch]) begin
        failures++;
        if (failures < 10) $display("enh ch %0d = %0d exp %0d", enh_ch, enh_data, exp_enh[enh_ch]);
      end
    end
    if (dut.mix_go)
      for (int c = 0; c < N_CH; c++)
        if (!dut.cur_speech) exp_enh[c] = 0;
        else case (dut.cur_mode)
          MODE_MAP:   exp_enh[c] = got_dnn[c];
          MODE_MASK:  exp_enh[c] = sat((longint'(noisy[c]) * got_dnn[N_CH + c]) >>> 10);
          MODE_JOINT: exp_enh[c] = sat((longint'(got_dnn[c]) * got_dnn[N_CH + c]) >>> 10);
          default:    exp_enh[c] = 0;
        endcase
    if (dut.mix_latch) noisy = stage;
    if (dut.co_valid) stage[dut.co_ch] = int'(dut.co_data);
    if (dut.fd_valid) feat[dut.fd_idx] = int'(dut.fd_data);
    if (dut.dnn_start) reference();
    if (dut.dn_done) begin
      checks++;
      if (dut.dn_speech != (cfg.vad_thr != 0)) begin failures++; $display("speech flag wrong"); end
      if (cfg.thr_up == 16'hffff) begin
        checks++;
        if (dut.dn_mode != ((cfg.thr_low == 16'hffff) ? MODE_MASK : MODE_JOINT)) begin
          failures++; $display("dnls mode %0d", dut.dn_mode);
        end
      end
    end
    if (dut.hop) begin cfg <= cfg_of(hops); hops++; end
    if (dnn_stall) n_stall++;
    if (overrun) n_over++;
    if (frame_done) begin
      n_frames++; checks++;
      if ((frame_mode == MODE_NONE) == frame_speech) begin failures++; $display("mode/speech mismatch"); end
      if (!frame_speech) n_quiet++;
      else case (frame_mode)
        MODE_MAP: n_map++;
        MODE_MASK: n_mask++;
        MODE_JOINT: n_joint++;
        default: ;
      endcase
    end
  end

  task automatic ld(int sel, int pe, int addr, int data);
    @(negedge clk); ld_we = 1; ld_sel = 2'(sel); ld_pe = 1'(pe); ld_addr = 20'(addr); ld_data = 20'(data);
  endtask

  initial begin
    for (int i = 0; i < 65; i++) lut[i] = int'($floor(1024.0 / (1.0 + $exp(8.0 - real'(i) / 4.0)) + 0.5));
    sample_valid = 0; sample = 0; cfg = cfg_of(0);
    gt_we = 0; gt_addr = 0; gt_sel = 0; gt_data = 0;
    ld_we = 0; ld_sel = 0; ld_pe = 0; ld_addr = 0; ld_data = 0;
    zeta[0] = 16'sd150; zeta[1] = 16'sd500; zeta[2] = 16'sd400;
    foreach (stage[i]) begin stage[i] = 0; noisy[i] = 0; end
    foreach (got_dnn[i]) got_dnn[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // gammatone sections: stable pole pairs, random numerators
    for (int s = 0; s < N_CH * N_SOS; s++) begin
      real r, th;
      int co [4];
      r  = 0.80 + 0.15 * ($urandom % 100) / 100.0;
      th = 0.05 + 2.5 * ($urandom % 100) / 100.0;
      co[0] = int'(-2.0 * r * $cos(th) * 16384.0);
      co[1] = int'(r * r * 16384.0);
      co[2] = int'($urandom % 8192) - 4096;
      co[3] = int'($urandom % 8192) - 4096;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); gt_we = 1; gt_addr = 8'(s); gt_sel = 2'(k); gt_data = 16'(co[k]);
      end
    end
    @(negedge clk); gt_we = 0;
    // network: PE 0 rows dense (75 %), PE 1 rows sparse (10 %)
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < nout_of(l); r++) begin
        B[l][r] = int'($urandom % 1024) - 512;
        for (int c = 0; c < nin_of(l); c++)
          W[l][r][c] = (($urandom % 100) < ((r % P == 0) ? 75 : 10)) ? (($urandom % 2) ? 8'sd1 : -8'sd1) : 8'sd0;
      end
    for (int p = 0; p < P; p++) begin
      int addr, col;
      addr = 0; col = 0;
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < nin_of(l); c++) begin
          int rows[$];
          bit neg[$];
          bit [4:0] ents[$];
          rows.delete(); neg.delete(); ents.delete();
          for (int r = p; r < nout_of(l); r += P)
            if (W[l][r][c] != 0) begin rows.push_back(r / P); neg.push_back(W[l][r][c] < 0); end
          encode_column(rows, neg, ents);
          ld(1, p, col, addr);
          foreach (ents[i]) begin ld(0, p, addr, int'(ents[i])); addr++; end
          col++;
        end
      ld(1, p, col, addr);
      $display("PE %0d holds %0d weight entries", p, addr);
    end
    for (int l = 0; l < NL; l++)
      for (int r = 0; r < nout_of(l); r++) ld(2, 0, l * NH + r, B[l][r] & 16'hffff);
    @(negedge clk); ld_we = 0;
    // audio: a tone with a period dividing the hop, plus noise whose level
    // changes from frame to frame
    for (int n = 0; n < FRAME_LEN + (NFR - 1) * HOP; n++) begin
      int f, amp, v;
      f   = n / HOP;
      amp = 300 + 2500 * ((f * 7) % 5);
      v   = int'(6000.0 * $sin(2.0 * 3.14159265 * 3.0 * n / 160.0)) + int'($urandom % (2 * amp + 1)) - amp;
      while (!sample_ready) @(negedge clk);
      sample_valid = 1; sample = 16'(v);
      @(negedge clk); sample_valid = 0;
      @(negedge clk);
    end
    repeat (120000) @(negedge clk);
    $display("frames %0d quiet %0d map %0d mask %0d joint %0d overruns %0d stall cycles %0d dnn outputs %0d enhanced %0d",
             n_frames, n_quiet, n_map, n_mask, n_joint, n_over, n_stall, n_dnn, n_enh);
    checks++; if (n_quiet == 0) begin failures++; $display("no noise-only frame"); end
    checks++; if (n_map == 0)   begin failures++; $display("MAP mode never used"); end
    checks++; if (n_mask == 0)  begin failures++; $display("MASK mode never used"); end
    checks++; if (n_joint == 0) begin failures++; $display("JOINT mode never used"); end
    checks++; if (n_stall == 0) begin failures++; $display("broadcast never stalled"); end
    checks++; if (n_over == 0)  begin failures++; $display("no overrun"); end
    checks++; if (n_enh != n_frames * N_CH) begin failures++; $display("enhanced count %0d", n_enh); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
