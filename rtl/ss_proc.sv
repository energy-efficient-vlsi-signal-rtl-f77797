// ss_proc: the 200 MS/s wideband spectrum-sensing processor (first chip).
// A multitap-windowed 1024-point FFT feeds a per-bin power estimator; a
// sequencer runs the sensing procedure and the adaptation blocks:
//   1. CAL    : the RF input is switched off (rf_off = 1); after SKIP frames
//               NCAL frames are averaged -> noise power sigma_vf^2(k) (M2).
//   2. COARSE : rf_off = 0; after SKIP frames NCOARSE frames are averaged ->
//               coarse power per bin C(k) (kept in MC).
//   3. STA    : serial pass over k: interfering power
//               sigma_if^2(k) = beta * (C(k-1) + C(k+1)) (neighbours wrap round
//               the spectrum) -> M3; sta gives M(k) -> MK; the largest M is kept.
//               Consecutive calls use the warm-started reciprocal.
//   4. PSD    : frames are accumulated into the per-bin sums; bin k only takes
//               part in its first M(k) frames, the run lasts max M(k) frames.
//   5. DTA    : serial pass over k: T(k) = sum, gamma(k) from dta, decision
//               H1 if T(k) > gamma(k). One result per bin on the res_* port.
// Powers are in the floating-point format of wss_pkg (value m * 2^(e+16))
// with the unit |X|^2 * 2^-PSH; averages over 64 frames are sums >> 6.
//
// Interface/timing: start (pulse, while idle) begins a run; input samples are
// taken whenever in_valid is high (L complex {re, im} IW-bit samples per
// clock; the FFT stream must keep running during a run); rf_off tells the
// front end to disconnect the antenna. res_valid pulses once per bin in bin
// order 0..N-1 during the DTA pass, then done pulses for one clock. beta and
// the window coefficients (coef_*) are host-programmable; beta is read as
// beta.m * 2^(beta.e + 16 - 24). sta_done/sta_warm
// pulse for each STA call and each call that used the warm start.
//
// Follows the text: procedure of Fig. 3.4 (noise calibration with the RF off,
// 64-frame coarse sensing, interference projection from adjacent bins with the
// factor beta, per-channel sensing time, threshold and decision), 1024-point
// FFT at 8 samples per clock, the 10/5-bit floating-point storage of M1-M3,
// M(k) bounded to 50 ms (9765 frames of 1024 samples at 200 MS/s).
// Own choices: NCAL = 512 calibration frames (with 64 frames the 13 % error of
// the noise estimate alone lifts the false-alarm rate from 10 % to about
// 25 %), SKIP = 3 frames of pipeline flush after each RF switch, the
// adjacent-bin projection uses the two direct neighbours, exact fixed-point
// sums for the per-bin averaging (see power_est), serial (not 4-way
// interleaved) STA/DTA passes, and the sequencing of the passes.
//
// Lint notes: psi from sta is not needed here (only M(k) is stored).
module ss_proc
  import wss_pkg::*;
#(
  parameter int N       = 1024,
  parameter int L       = 8,
  parameter int P       = 2,
  parameter int IW      = 12,
  parameter int NCAL    = 512,
  parameter int NCOARSE = 64,
  parameter int SKIP    = 3,
  parameter int PSH     = 8,
  parameter int MMAX    = 9765
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  fp_t                    beta,
  input  logic                   coef_we,
  input  logic [$clog2(P*N)-1:0] coef_addr,
  input  logic [11:0]            coef_din,
  input  logic                   in_valid,
  input  logic [L*2*IW-1:0]      din,
  output logic                   rf_off,
  output logic                   busy,
  output logic                   done,
  output logic [2:0]             phase,
  output logic                   res_valid,
  output logic [$clog2(N)-1:0]   res_bin,
  output logic                   res_h1,
  output fp_t                    res_t,
  output fp_t                    res_gamma,
  output logic [15:0]            res_mk,
  output logic [15:0]            m_max,
  output logic                   sta_done,
  output logic                   sta_warm
);
  localparam int FW    = 24;
  localparam int T     = N / L;
  localparam int LOG2M = $clog2(T);
  localparam int KW    = $clog2(N);
  localparam int C6    = $clog2(NCAL);
  localparam int CC6   = $clog2(NCOARSE);

  typedef enum logic [2:0] {
    S_IDLE, S_CAL, S_NOISE, S_COARSE, S_CPASS, S_STA, S_PSD, S_DTA
  } state_t;
  state_t st;
  assign phase = st;

  // ---------------- datapath: window -> FFT -> power ----------------
  logic              w_valid, f_valid;
  logic [L*2*FW-1:0] w_out, f_out;
  logic [LOG2M-1:0]  f_q, f_seq;

  multitap_window #(.P(P), .N(N), .L(L), .IW(IW), .CW(12), .DW(FW)) u_win (
    .clk, .rst_n, .clr(1'b0), .coef_we, .coef_addr, .coef_din,
    .in_valid, .din, .out_valid(w_valid), .dout(w_out));

  fft_mpath #(.L(L), .LOG2M(LOG2M), .RECONF(0)) u_fft (
    .clk, .rst_n, .clr(1'b0), .log2m(4'(LOG2M)), .in_valid(w_valid), .din(w_out),
    .out_valid(f_valid), .dout(f_out), .out_q(f_q), .out_seq(f_seq));

  logic [KW-1:0] rd_bin;
  logic [63:0]   rd_sum;
  logic          acc_now, acc_first;
  logic [L-1:0]  acc_en;

  power_est #(.L(L), .N(N), .DW(FW), .AW(64)) u_pwr (
    .clk, .in_valid(f_valid && acc_now), .din(f_out), .q(f_q), .first(acc_first),
    .en(acc_en), .rd_bin, .rd_sum);

  // ---------------- memories ----------------
  fp_t          m2 [N];     // noise power per frame
  fp_t          mc [N];     // coarse power per frame
  fp_t          m3 [N];     // interfering power per frame
  logic [15:0]  mk [N];     // frames to average

  // ---------------- frame accumulation control ----------------
  logic [15:0]  target, fcnt, fidx;
  logic [2:0]   skip;
  logic         acc_frame;
  logic         frame_start, frame_end, acc_last_end;

  assign frame_start = f_valid && f_seq == '0;
  assign frame_end   = f_valid && f_seq == LOG2M'(T-1);
  wire accumulating  = (st == S_CAL) || (st == S_COARSE) || (st == S_PSD);
  wire take_frame    = accumulating && skip == '0 && fcnt < target;
  assign acc_now     = frame_start ? take_frame : acc_frame;
  assign acc_first   = frame_start ? (fcnt == '0) : (fidx == '0);
  wire [15:0] cur_idx = frame_start ? fcnt : fidx;
  assign acc_last_end = frame_end && acc_frame && (fidx == target - 1'b1);

  always_comb
    for (int p = 0; p < L; p++)
      acc_en[p] = (st != S_PSD) || (cur_idx < mk[p*T + int'(f_q)]);

  // ---------------- serial passes ----------------
  logic [KW-1:0] k;
  logic          wait_done;
  fp_t           c_sum, sif_k, t_k, gamma;
  logic          sta_go, sta_busy, sta_fin, sta_wu, dta_go, dta_busy, dta_fin, h1;
  logic [15:0]   mk_k;
  logic [9:0]    psi_k;

  assign rd_bin = k;
  fp_add u_cadd (.a(mc[k - 1'b1]), .b(mc[k + 1'b1]), .s(c_sum));
  // beta carries an implied scale 2^-24 (it is a fraction, below the
  // format's smallest step)
  fp_mul #(.SH(24)) u_beta (.a(c_sum), .b(beta), .p(sif_k));

  sta #(.MMAX(MMAX)) u_sta (
    .clk, .rst_n, .start(sta_go), .warm(k != '0), .sif(sif_k), .svf(m2[k]),
    .busy(sta_busy), .done(sta_fin), .mk(mk_k), .psi(psi_k), .warm_used(sta_wu));

  assign t_k = fp_from_sum(rd_sum, PSH);
  dta u_dta (
    .clk, .rst_n, .start(dta_go), .mk(mk[k]), .svf(m2[k]), .sif(m3[k]),
    .busy(dta_busy), .done(dta_fin), .gamma);
  power_detect u_det (.t_stat(t_k), .gamma, .h1);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rf_off <= 1'b0; busy <= 1'b0; done <= 1'b0;
      target <= '0; fcnt <= '0; fidx <= '0; skip <= '0; acc_frame <= 1'b0;
      k <= '0; wait_done <= 1'b0; sta_go <= 1'b0; dta_go <= 1'b0;
      res_valid <= 1'b0; res_bin <= '0; res_h1 <= 1'b0; res_t <= FP_ZERO;
      res_gamma <= FP_ZERO; res_mk <= '0; m_max <= '0;
      sta_done <= 1'b0; sta_warm <= 1'b0;
    end else begin
      done <= 1'b0; res_valid <= 1'b0; sta_go <= 1'b0; dta_go <= 1'b0;
      sta_done <= 1'b0; sta_warm <= 1'b0;

      // frame bookkeeping for the accumulating states
      if (frame_start && accumulating) begin
        if (skip != '0) skip <= skip - 1'b1;
        acc_frame <= take_frame;
        if (take_frame) begin fidx <= fcnt; fcnt <= fcnt + 1'b1; end
      end
      if (frame_end) acc_frame <= 1'b0;

      case (st)
        S_IDLE: if (start) begin
          st <= S_CAL; busy <= 1'b1; rf_off <= 1'b1;
          skip <= 3'(SKIP); fcnt <= '0; target <= 16'(NCAL); acc_frame <= 1'b0;
        end
        S_CAL: if (acc_last_end) begin st <= S_NOISE; k <= '0; end
        S_NOISE: begin
          m2[k] <= fp_from_sum(rd_sum, C6 + PSH);
          k <= k + 1'b1;
          if (k == KW'(N-1)) begin
            st <= S_COARSE; rf_off <= 1'b0;
            skip <= 3'(SKIP); fcnt <= '0; target <= 16'(NCOARSE); acc_frame <= 1'b0;
          end
        end
        S_COARSE: if (acc_last_end) begin st <= S_CPASS; k <= '0; end
        S_CPASS: begin
          mc[k] <= fp_from_sum(rd_sum, CC6 + PSH);
          k <= k + 1'b1;
          if (k == KW'(N-1)) begin st <= S_STA; k <= '0; m_max <= '0; end
        end
        S_STA: begin
          if (!wait_done && !sta_busy && !sta_go) begin
            sta_go <= 1'b1; wait_done <= 1'b1;
          end else if (sta_fin) begin
            wait_done <= 1'b0;
            m3[k] <= sif_k; mk[k] <= mk_k;
            sta_done <= 1'b1; sta_warm <= sta_wu;
            if (mk_k > m_max) m_max <= mk_k;
            k <= k + 1'b1;
            if (k == KW'(N-1)) begin
              st <= S_PSD; skip <= '0; fcnt <= '0; acc_frame <= 1'b0;
              target <= (mk_k > m_max) ? mk_k : m_max;
            end
          end
        end
        S_PSD: if (acc_last_end) begin st <= S_DTA; k <= '0; end
        S_DTA: begin
          if (!wait_done && !dta_busy && !dta_go) begin
            dta_go <= 1'b1; wait_done <= 1'b1;
          end else if (dta_fin) begin
            wait_done <= 1'b0;
            res_valid <= 1'b1; res_bin <= k; res_h1 <= h1; res_t <= t_k;
            res_gamma <= gamma; res_mk <= mk[k];
            k <= k + 1'b1;
            if (k == KW'(N-1)) begin st <= S_IDLE; busy <= 1'b0; done <= 1'b1; end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
