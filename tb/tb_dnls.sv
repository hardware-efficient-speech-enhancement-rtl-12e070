// tb_dnls: streams frames of a sinusoid plus a growing amount of noise, with
// the DNLS settings changed between frames so that all three modes and both
// VAD outcomes occur. For each frame it computes R(j,j-1) and R(j-1,j-1)
// itself and checks N_k = 1 - R(j,j-1)/R(j-1,j-1) (within 4 LSB of Q1.15),
// then checks N'_k, gamma, mode and speech exactly from the recursion, with
// phi selected by |N_k - N'_{k-1}|.
module tb_dnls;
  import se_pkg::*;
  logic clk = 0, rst_n = 0;
  dnls_cfg_t cfg;
  logic in_valid, done, speech;
  logic [8:0] in_idx;
  logic signed [15:0] in_data;
  logic [15:0] n_k, n_avg, gamma;
  se_mode_e mode;
  int checks = 0, failures = 0;
  int prevf[400], curf[400];
  int avg_prev;
  int seen[4];
  always #5 clk = ~clk;
  dnls dut (.*);
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg = DNLS_CFG_DEFAULT; in_valid = 0; in_idx = 0; in_data = 0; avg_prev = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 24; f++) begin
      longint rxy, ryy;
      int nk_exp, navg, d, phi, dn, gam;
      longint gp;
      int nz;
      nz = (f % 3 == 1) ? 2000 + 700 * f : 200;
      cfg.gamma_gain = 16'((f % 4) * 2048 + 256);
      cfg.vad_thr    = (f % 5 == 4) ? 16'd100 : 16'd31130;
      rxy = 0; ryy = 0;
      for (int n = 0; n < 400; n++) begin
        curf[n] = int'(8000.0 * $sin(2.0 * 3.14159265358979 * 3.0 / 160.0 * n)) + (int'($urandom % (2 * nz + 1)) - nz);
        rxy += longint'(curf[n]) * prevf[n];
        ryy += longint'(prevf[n]) * prevf[n];
        @(negedge clk); in_valid = 1; in_idx = 9'(n); in_data = 16'(curf[n]);
      end
      @(negedge clk); in_valid = 0;
      while (!done) @(negedge clk);
      // N_k
      if (f == 0 || ryy <= 0 || rxy >= ryy) nk_exp = 0;
      else if (rxy <= 0) nk_exp = 32768;
      else nk_exp = 32768 - int'((rxy * 32768) / ryy);
      checks++;
      if (int'(n_k) > nk_exp + 4 || int'(n_k) < nk_exp - 4) begin failures++; $display("f%0d N_k %0d exp %0d", f, n_k, nk_exp); end
      // recursion from the block's N_k
      d    = int'(n_k) - avg_prev;
      phi  = ((d < 0 ? -d : d) > int'(cfg.stat_thr)) ? int'(cfg.phi_fast) : int'(cfg.phi_slow);
      navg = avg_prev + int'((longint'(d) * phi) >>> 15);
      checks++;
      if (int'(n_avg) != navg) begin failures++; $display("f%0d N' %0d exp %0d", f, n_avg, navg); end
      dn  = navg > avg_prev ? navg - avg_prev : avg_prev - navg;
      gp  = ((longint'(navg) * dn >>> 15) * cfg.gamma_gain) >>> 8;
      gam = gp > 32768 ? 32768 : int'(gp);
      checks++;
      if (int'(gamma) != gam) begin failures++; $display("f%0d gamma %0d exp %0d", f, gamma, gam); end
      checks++;
      if (mode != (gp > cfg.thr_up ? MODE_MAP : gp < cfg.thr_low ? MODE_MASK : MODE_JOINT)) begin
        failures++; $display("f%0d mode %0d gamma %0d", f, mode, gp);
      end
      checks++;
      if (speech != (navg < int'(cfg.vad_thr))) begin failures++; $display("f%0d speech", f); end
      seen[mode]++;
      if (!speech) seen[0]++;
      avg_prev = navg;
      prevf = curf;
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("mode/vad case %0d never happened", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
