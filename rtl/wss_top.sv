// wss_top: the two spectrum-sensing chips side by side. They share no logic
// and no signals; each keeps its own clock, reset and ports (prefix c1_ for
// the 200 MS/s sensing processor, c2_ for the 500 MS/s band segmentation).
//   c1 (ss_proc): multitap-windowed 1024-point FFT power detector with
//      noise calibration, sensing-time adaptation (STA), detection-threshold
//      adaptation (DTA) and per-channel decisions.
//   c2 (band_seg): coarse 64-point scan, band selection, mixer + CIC
//      decimation, reconfigurable fine FFT, band width/centre estimation.
// Interfaces and timing are those of the two blocks (see their headers).
// All parameters keep the values of the text.
module wss_top
  import wss_pkg::*;
(
  // ---- chip 1: wideband spectrum sensing, 8 x 12-bit complex per clock ----
  input  logic            c1_clk,
  input  logic            c1_rst_n,
  input  logic            c1_start,
  input  fp_t             c1_beta,
  input  logic            c1_coef_we,
  input  logic [10:0]     c1_coef_addr,
  input  logic [11:0]     c1_coef_din,
  input  logic            c1_in_valid,
  input  logic [8*2*12-1:0] c1_din,
  output logic            c1_rf_off,
  output logic            c1_busy,
  output logic            c1_done,
  output logic [2:0]      c1_phase,
  output logic            c1_res_valid,
  output logic [9:0]      c1_res_bin,
  output logic            c1_res_h1,
  output fp_t             c1_res_t,
  output fp_t             c1_res_gamma,
  output logic [15:0]     c1_res_mk,
  output logic [15:0]     c1_m_max,
  output logic            c1_sta_done,
  output logic            c1_sta_warm,
  // ---- chip 2: band segmentation, 16 x 10-bit complex per clock ----
  input  logic            c2_clk,
  input  logic            c2_rst_n,
  input  logic            c2_start,
  input  logic [55:0]     c2_thr_coarse,
  input  logic [55:0]     c2_thr_fine,
  input  logic            c2_in_valid,
  input  logic [16*2*10-1:0] c2_din,
  output logic            c2_busy,
  output logic            c2_done,
  output logic            c2_mode,
  output logic            c2_found_c,
  output logic [13:0]     c2_bw_c,
  output logic [13:0]     c2_c2_c,
  output logic            c2_found_f,
  output logic [13:0]     c2_bw_f,
  output logic [13:0]     c2_c2_f,
  output logic [3:0]      c2_log2r,
  output logic [9:0]      c2_stage_en,
  output logic [15:0]     c2_gap_fills,
  output logic            c2_cic_valid,
  output logic [16*2*14-1:0] c2_cic_dout,
  output logic [4:0]      c2_cic_lanes
);
  ss_proc u_c1 (
    .clk(c1_clk), .rst_n(c1_rst_n), .start(c1_start), .beta(c1_beta),
    .coef_we(c1_coef_we), .coef_addr(c1_coef_addr), .coef_din(c1_coef_din),
    .in_valid(c1_in_valid), .din(c1_din), .rf_off(c1_rf_off), .busy(c1_busy),
    .done(c1_done), .phase(c1_phase), .res_valid(c1_res_valid), .res_bin(c1_res_bin),
    .res_h1(c1_res_h1), .res_t(c1_res_t), .res_gamma(c1_res_gamma), .res_mk(c1_res_mk),
    .m_max(c1_m_max), .sta_done(c1_sta_done), .sta_warm(c1_sta_warm));

  band_seg u_c2 (
    .clk(c2_clk), .rst_n(c2_rst_n), .start(c2_start), .thr_coarse(c2_thr_coarse),
    .thr_fine(c2_thr_fine), .in_valid(c2_in_valid), .din(c2_din), .busy(c2_busy),
    .done(c2_done), .mode(c2_mode), .found_c(c2_found_c), .bw_c(c2_bw_c), .c2_c(c2_c2_c),
    .found_f(c2_found_f), .bw_f(c2_bw_f), .c2_f(c2_c2_f), .log2r(c2_log2r),
    .stage_en(c2_stage_en), .gap_fills(c2_gap_fills), .cic_valid(c2_cic_valid),
    .cic_dout(c2_cic_dout), .cic_lanes(c2_cic_lanes));
endmodule
