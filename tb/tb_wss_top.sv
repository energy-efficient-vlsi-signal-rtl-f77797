// tb_wss_top: end-to-end, full-size test of both chips (no parameter
// overrides), each with its own clock.
//
// Chip 1 (200 MS/s sensing processor): the testbench loads a 2-tap sinc x Hann
// window (normalised to (1/N) sum w^2 = 1) and streams complex Gaussian
// noise; while rf_off is low it adds a weak primary user on bin 200 and a
// strong interferer on bin 600. It then checks per-bin results: H1 on bin
// 200, a false-alarm rate below 25 % on clean bins (design target 10 %), a
// longer sensing time M(k) next to the interferer than on clean bins, and
// M(k) within [99, 9765].
// Chip 2 (500 MS/s band segmentation): noise plus a band-limited signal
// (complex Gaussian noise through two 50-tap moving averages, about 16 MHz
// wide, clearly above the noise at its peak) centred at 137.5 MHz, as in the design example. It checks the coarse
// centre and width, a CIC ratio of 4 to 16 (fine FFT of 2048 to 512 points),
// and that the fine centre improves on the coarse one (within 4 MHz) with a
// plausible fine width (3 to 35 MHz). It also counts data through the fine
// path: the CIC must deliver 16/R lanes per input beat and the lane packer one
// 16-lane word per 16 lanes (small tolerances for data still in flight).
// Mechanisms counted (a count of zero is a failure): RF-off noise
// calibration, warm-started reciprocal, per-bin gating of the averaging,
// sensing-time adaptation, H1 and H0 decisions (chip 1); coarse-to-fine mode
// switch, clock-gated CIC stages and decimated/packed CIC output (chip 2).
module tb_wss_top;
  import wss_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic real gauss();
    return (real'($urandom_range(10000)) + real'($urandom_range(10000)) +
            real'($urandom_range(10000)) - 15000.0) / 5000.0;   // unit-ish variance
  endfunction
  localparam real PI = 3.14159265358979;

  // ---------------- chip 1 ----------------
  logic c1_clk = 0, c1_rst_n = 0, c1_start = 0, c1_coef_we = 0, c1_in_valid = 0;
  fp_t c1_beta;
  logic [10:0] c1_coef_addr; logic [11:0] c1_coef_din;
  logic [8*2*12-1:0] c1_din;
  logic c1_rf_off, c1_busy, c1_done, c1_res_valid, c1_res_h1, c1_sta_done, c1_sta_warm;
  logic [2:0] c1_phase; logic [9:0] c1_res_bin; fp_t c1_res_t, c1_res_gamma;
  logic [15:0] c1_res_mk, c1_m_max;
  // ---------------- chip 2 ----------------
  logic c2_clk = 0, c2_rst_n = 0, c2_start = 0, c2_in_valid = 0;
  logic [55:0] c2_thr_coarse, c2_thr_fine;
  logic [16*2*10-1:0] c2_din;
  logic c2_busy, c2_done, c2_mode, c2_found_c, c2_found_f, c2_cic_valid;
  logic [13:0] c2_bw_c, c2_c2_c, c2_bw_f, c2_c2_f;
  logic [3:0] c2_log2r; logic [9:0] c2_stage_en; logic [15:0] c2_gap_fills;
  logic [16*2*14-1:0] c2_cic_dout; logic [4:0] c2_cic_lanes;

  always #5 c1_clk = ~c1_clk;
  always #2 c2_clk = ~c2_clk;

  wss_top dut (.*);

  // mechanism counters
  int n_rfoff = 0, n_warm = 0, n_sta = 0, n_gated_bins = 0, n_h1 = 0, n_h0 = 0;
  int n_mode_sw = 0, n_gated_stage = 0, n_packed = 0, n_fin_in = 0, n_pk = 0;
  longint n_cic_ln = 0;
  int mk_bin[1024]; bit h1_bin[1024];
  bit c1_fin = 0, c2_fin = 0;

  // counters start once reset is released (register values before reset are arbitrary)
  always @(posedge c1_clk) if (c1_rst_n) begin
    if (c1_rf_off) n_rfoff++;
    if (c1_sta_warm) n_warm++;
    if (c1_sta_done) n_sta++;
    if (c1_res_valid) begin
      mk_bin[c1_res_bin] = c1_res_mk; h1_bin[c1_res_bin] = c1_res_h1;
      if (c1_res_h1) n_h1++; else n_h0++;
    end
  end
  logic c2_mode_q = 0;
  always @(posedge c2_clk) if (c2_rst_n) begin
    c2_mode_q <= c2_mode;
    if (c2_mode && !c2_mode_q) n_mode_sw++;
    if (c2_mode && c2_stage_en != '1) n_gated_stage++;
    if (c2_mode && c2_cic_valid && c2_cic_lanes < 16) n_packed++;
    // data rates through the fine path: input beats, CIC output lanes, packed words
    if (c2_mode && c2_busy && c2_in_valid) n_fin_in++;
    if (c2_mode && c2_busy && c2_cic_valid) n_cic_ln += longint'(c2_cic_lanes);
    if (c2_mode && c2_busy && dut.u_c2.pk_valid) n_pk++;
  end

  // ---------------- chip 1 stimulus ----------------
  initial begin
    real w, x, s, nrm;
    real ph_pu, ph_if;
    int n;
    c1_beta.m = 10'sd336; c1_beta.e = -5'sd15;     // beta = 336 * 2^-23 = 4.0e-5
    repeat (4) @(posedge c1_clk);
    c1_rst_n = 1;
    // window: sinc over 2N samples, Hann taper, normalised
    nrm = 0;
    for (int i = 0; i < 2048; i++) begin
      x = (real'(i) - 1023.5) / 1024.0;
      s = (x == 0) ? 1.0 : $sin(PI * x) / (PI * x);
      w = s * (0.5 - 0.5 * $cos(2.0 * PI * (real'(i) + 0.5) / 2048.0));
      nrm += w * w;
    end
    nrm = $sqrt(nrm / 1024.0);
    for (int i = 0; i < 2048; i++) begin
      @(negedge c1_clk);
      x = (real'(i) - 1023.5) / 1024.0;
      s = (x == 0) ? 1.0 : $sin(PI * x) / (PI * x);
      w = s * (0.5 - 0.5 * $cos(2.0 * PI * (real'(i) + 0.5) / 2048.0)) / nrm;
      c1_coef_we = 1; c1_coef_addr = 11'(i); c1_coef_din = 12'($rtoi(w * 2048.0 + 0.5));
    end
    @(negedge c1_clk); c1_coef_we = 0;
    fork
      begin
        @(negedge c1_clk); c1_start = 1; @(negedge c1_clk); c1_start = 0;
      end
      begin
        n = 0;
        while (!c1_fin) begin
          @(negedge c1_clk);
          c1_in_valid = 1;
          for (int l = 0; l < 8; l++) begin
            real re, im;
            re = 30.0 * gauss(); im = 30.0 * gauss();
            if (!c1_rf_off) begin
              ph_pu = 2.0 * PI * 200.0 * real'(n) / 1024.0;
              ph_if = 2.0 * PI * 600.0 * real'(n) / 1024.0;
              re += 6.0 * $cos(ph_pu) + 150.0 * $cos(ph_if);
              im += 6.0 * $sin(ph_pu) + 150.0 * $sin(ph_if);
            end
            c1_din[l*24+12 +: 12] = 12'($rtoi(re));
            c1_din[l*24 +: 12]    = 12'($rtoi(im));
            n++;
          end
        end
      end
    join_any
  end

  // ---------------- chip 2 stimulus ----------------
  initial begin
    real q1r[50], q1i[50], q2r[50], q2i[50];
    real s1r = 0, s1i = 0, s2r = 0, s2i = 0, gr, gi, br, bi, ph;
    int p = 0, n = 0;
    real sig2;
    for (int i = 0; i < 50; i++) begin q1r[i] = 0; q1i[i] = 0; q2r[i] = 0; q2i[i] = 0; end
    sig2 = 2.0 * 400.0;                               // noise power per sample
    c2_thr_coarse = 56'($rtoi(1.5 * 160.0 * 64.0 * sig2));
    c2_thr_fine   = '0;
    repeat (4) @(posedge c2_clk);
    c2_rst_n = 1;
    fork
      begin
        @(negedge c2_clk); c2_start = 1; @(negedge c2_clk); c2_start = 0;
      end
      begin
        while (!c2_fin) begin
          @(negedge c2_clk);
          c2_in_valid = 1;
          for (int l = 0; l < 16; l++) begin
            // band-limited signal: two cascaded 50-sample moving averages
            gr = 2.0 * gauss(); gi = 2.0 * gauss();
            s1r += gr - q1r[p]; s1i += gi - q1i[p]; q1r[p] = gr; q1i[p] = gi;
            br = s1r / 7.07; bi = s1i / 7.07;
            s2r += br - q2r[p]; s2i += bi - q2i[p]; q2r[p] = br; q2i[p] = bi;
            br = s2r / 7.07; bi = s2i / 7.07;
            p = (p + 1) % 50;
            ph = 2.0 * PI * 0.275 * real'(n);
            gr = br * $cos(ph) - bi * $sin(ph) + 20.0 * gauss();
            gi = br * $sin(ph) + bi * $cos(ph) + 20.0 * gauss();
            c2_din[l*20+10 +: 10] = 10'($rtoi(gr));
            c2_din[l*20 +: 10]    = 10'($rtoi(gi));
            n++;
          end
        end
      end
    join_any
  end

  // fine threshold: 1.6 x expected noise sum after the CIC, set at the switch
  initial begin
    real h[], g, hs;
    int r;
    wait (c2_rst_n); @(posedge c2_clk);
    wait (c2_mode);
    r = 1 << c2_log2r;
    h = new[4*r];
    foreach (h[i]) h[i] = 0;
    h[0] = 1;
    for (int st = 0; st < 4; st++)                     // (boxcar R)^4 / R^4
      for (int i = 4*r-1; i >= 0; i--) begin
        hs = 0;
        for (int j = 0; j < r; j++) if (i - j >= 0) hs += h[i-j];
        h[i] = hs / real'(r);
      end
    g = 0;
    foreach (h[i]) g += h[i] * h[i];
    g = g * 256.0;                                     // CIC gain 16
    c2_thr_fine = 56'(longint'(1.6 * 40.0 * real'(8192 / r) * 800.0 * g));
    $display("chip2: R=%0d fine N=%0d noise gain=%f thr=%0d", r, 8192 / r, g, c2_thr_fine);
  end

  // ---------------- result checks ----------------
  initial begin
    int fa, clean, mclean;
    real fc_c, fc_f;
    fork
      begin wait (c1_rst_n); @(posedge c1_clk); wait (c1_done); c1_fin = 1; end
      begin wait (c2_rst_n); @(posedge c2_clk); wait (c2_done); c2_fin = 1; end
    join
    // chip 1
    fa = 0; clean = 0;
    for (int k = 0; k < 1024; k++)
      if ((k < 195 || k > 205) && (k < 590 || k > 610)) begin
        clean++; if (h1_bin[k]) fa++;
      end
    mclean = mk_bin[100];
    $display("chip1: M(200)=%0d M(599)=%0d M(601)=%0d M(100)=%0d max=%0d false alarms %0d/%0d",
             mk_bin[200], mk_bin[599], mk_bin[601], mclean, c1_m_max, fa, clean);
    chk(h1_bin[200], "primary user on bin 200 not detected");
    chk(fa * 4 < clean, $sformatf("false-alarm rate %0d/%0d", fa, clean));
    chk(mk_bin[599] > mclean && mk_bin[601] > mclean, "no sensing-time increase next to the interferer");
    chk(mclean >= 97 && c1_m_max <= 9765, "M(k) out of range");
    for (int k = 0; k < 1024; k++) if (mk_bin[k] < c1_m_max) n_gated_bins++;
    // chip 2
    fc_c = (real'(c2_c2_c) - 64.0) / 2.0 * 500.0 / 64.0;
    fc_f = fc_c + (real'(c2_c2_f) - real'(8192 >> c2_log2r)) / 2.0 * 500.0 / 8192.0;
    $display("chip2: coarse bw=%0d c2=%0d (%f MHz), R=%0d, fine bw=%0d c2=%0d (%f MHz, %f MHz wide)",
             c2_bw_c, c2_c2_c, fc_c, 1 << c2_log2r, c2_bw_f, c2_c2_f, fc_f, real'(c2_bw_f) * 500.0 / 8192.0);
    chk(c2_found_c && c2_bw_c >= 1 && c2_bw_c <= 5, "coarse band width");
    chk(fc_c > 137.5 - 8.0 && fc_c < 137.5 + 8.0, "coarse centre");
    chk(c2_log2r >= 2 && c2_log2r <= 4, "CIC ratio");
    chk(c2_found_f, "fine band not found");
    $display("chip2 rates: fine input beats=%0d CIC lanes=%0d packed words=%0d", n_fin_in, n_cic_ln, n_pk);
    chk(n_fin_in > 0 && (n_cic_ln * (64'sd1 << c2_log2r) - 16 * longint'(n_fin_in)) ** 2 < (16 * 64) ** 2,
        "CIC output rate is not 16/R lanes per input beat");
    chk((longint'(n_pk) * 16 - n_cic_ln) ** 2 < 64 ** 2, "lane packer does not emit one word per 16 lanes");
    // the fine estimate must improve on the coarse one; without the CIC-shaped
    // threshold the droop around the coarse centre biases it by a few MHz
    chk((fc_f - 137.5) ** 2 < (fc_c - 137.5) ** 2 + 0.25 && fc_f > 137.5 - 4.0 && fc_f < 137.5 + 4.0, "fine centre");
    chk(real'(c2_bw_f) * 500.0 / 8192.0 > 3.0 && real'(c2_bw_f) * 500.0 / 8192.0 < 35.0, "fine width");
    // mechanisms
    $display("mechanisms: rf_off=%0d warm=%0d/%0d gated_bins=%0d h1=%0d h0=%0d mode_switch=%0d gated_stage=%0d packed=%0d",
             n_rfoff, n_warm, n_sta, n_gated_bins, n_h1, n_h0, n_mode_sw, n_gated_stage, n_packed);
    chk(n_rfoff > 0, "mechanism: RF-off noise calibration");
    chk(n_warm > 0, "mechanism: warm-started reciprocal");
    chk(n_gated_bins > 0, "mechanism: per-bin gating of the averaging");
    chk(c1_m_max > mclean, "mechanism: sensing-time adaptation");
    chk(n_h1 > 0, "mechanism: H1 decision");
    chk(n_h0 > 0, "mechanism: H0 decision");
    chk(n_mode_sw == 1, "mechanism: coarse-to-fine mode switch");
    chk(n_gated_stage > 0, "mechanism: clock-gated CIC stages");
    chk(n_packed > 0, "mechanism: decimated CIC output packed for the FFT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    $display("watchdog: c1 phase=%0d c2 mode=%0d", c1_phase, c2_mode);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
