// band_seg: the 500 MS/s wideband band-segmentation processor (second chip).
// It finds the band of interest with a cheap coarse scan and then channelises
// only that band with a finer FFT at a reduced rate:
//   COARSE : the raw 16-sample-per-clock input is transformed by a 64-point
//            FFT; M_COARSE frames are averaged; per-bin decisions against
//            thr_coarse go, in frequency order, to the parameter estimation,
//            which reports the widest band: width b (coarse bins) and doubled
//            centre c2.
//   CONFIG : the band is moved to DC by the mixer (phase step 64 per half
//            coarse bin of offset), the CIC ratio is R = largest power of two
//            <= min(RMAX, K_OSR / b) (2x over-sampling, fine FFT of at least
//            2 N / N_coarse = 256 points), the FFT is reconfigured to
//            N / R points (log2m = 9 - log2 R) and cleared.
//   FINE   : SKIP frames flush the filter and FFT, then M_FINE frames are
//            averaged and decided against thr_fine; the parameter estimation
//            reports the fine width and centre (fine bins, in the decimated
//            spectrum centred on the coarse estimate).
// No band found in the coarse scan ends the run with found_c = 0.
//
// Interface/timing: start (pulse, while idle); din = 16 complex {re, im}
// 10-bit samples per clock whenever in_valid; the input must keep streaming
// during a run. done pulses at the end. cic_* is the filtered, decimated band
// for the signal classifier (valid in the fine phase). mode = 1 in the fine
// phase; stage_en shows the CIC stages running (the others are clock-gated).
//
// Follows the text: coarse sensing with a 64-point FFT, M_coarse = 160 and
// M_fine = 40 frames, fine FFT N_fine = N / R with N = 8192 (the size of the
// text's energy model), 4th-order CIC, 16-way parallel reconfigurable FFT
// (64 to 8192 points), design example b = 2 -> 512 points.
// Own choices: K_OSR = 32 so that the design example maps to R = 16, the
// parameter-estimation rules, SKIP, and the thresholds being inputs.
//
// Lint notes: the controller uses only the decisions and the parameter
// estimator's width and centre, so the sum read port and the start-bin output
// of the sub-blocks are left unread;
// ratio_log's loop variable is wider than the 4-bit result on purpose.
module band_seg #(
  parameter int L         = 16,
  parameter int IW        = 10,
  parameter int LOG2M_MAX = 9,
  parameter int LOG2M_C   = 2,
  parameter int M_COARSE  = 160,
  parameter int M_FINE    = 40,
  parameter int K_OSR     = 32,
  parameter int RMAX_LOG  = 5,
  parameter int SKIP      = 2,
  parameter int AW        = 56,
  localparam int KW       = LOG2M_MAX + $clog2(L)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [AW-1:0]         thr_coarse,
  input  logic [AW-1:0]         thr_fine,
  input  logic                  in_valid,
  input  logic [L*2*IW-1:0]     din,
  output logic                  busy,
  output logic                  done,
  output logic                  mode,
  output logic                  found_c,
  output logic [KW:0]           bw_c,
  output logic [KW:0]           c2_c,
  output logic                  found_f,
  output logic [KW:0]           bw_f,
  output logic [KW:0]           c2_f,
  output logic [3:0]            log2r,
  output logic [9:0]            stage_en,
  output logic [15:0]           gap_fills,
  output logic                  cic_valid,
  output logic [L*2*14-1:0]     cic_dout,
  output logic [4:0]            cic_lanes
);
  localparam int DW = 24;
  localparam int CW = 14;

  typedef enum logic [2:0] {S_IDLE, S_CACC, S_CPASS, S_CFG, S_FACC, S_FPASS} state_t;
  state_t st;

  // ---------------- datapath ----------------
  logic              clr_dp;
  logic [3:0]        log2m;
  logic signed [12:0] inc;
  logic              mx_valid, pk_valid, f_in_valid, f_valid;
  logic [L*2*IW-1:0] mx_out;
  logic [L*2*CW-1:0] pk_out;
  logic [L*2*DW-1:0] f_in, f_out;
  logic [LOG2M_MAX-1:0] f_q, f_seq;

  nco_mixer #(.L(L), .IW(IW), .OW(IW), .PW(13)) u_mix (
    .clk, .rst_n, .clr(clr_dp), .inc, .in_valid(in_valid && mode), .din,
    .out_valid(mx_valid), .dout(mx_out));

  cic_ff #(.L(L), .IW(IW), .OW(CW), .NSTAGE(10)) u_cic (
    .clk, .rst_n, .clr(clr_dp), .log2r, .in_valid(mx_valid), .din(mx_out),
    .out_valid(cic_valid), .dout(cic_dout), .out_lanes(cic_lanes), .stage_en);

  lane_packer #(.L(L), .W(2*CW)) u_pack (
    .clk, .rst_n, .clr(clr_dp), .nin(cic_lanes), .in_valid(cic_valid), .din(cic_dout),
    .out_valid(pk_valid), .dout(pk_out));

  always_comb begin
    for (int l = 0; l < L; l++) begin
      if (mode) begin
        f_in[l*2*DW+DW +: DW] = DW'($signed(pk_out[l*2*CW+CW +: CW]));
        f_in[l*2*DW +: DW]    = DW'($signed(pk_out[l*2*CW +: CW]));
      end else begin
        f_in[l*2*DW+DW +: DW] = DW'($signed(din[l*2*IW+IW +: IW]));
        f_in[l*2*DW +: DW]    = DW'($signed(din[l*2*IW +: IW]));
      end
    end
    f_in_valid = mode ? pk_valid : in_valid;
  end

  fft_mpath #(.L(L), .LOG2M(LOG2M_MAX), .RECONF(1)) u_fft (
    .clk, .rst_n, .clr(clr_dp), .log2m, .in_valid(f_in_valid), .din(f_in),
    .out_valid(f_valid), .dout(f_out), .out_q(f_q), .out_seq(f_seq));

  // ---------------- frame accumulation ----------------
  logic [7:0]  target, fcnt, fidx;
  logic [2:0]  skip;
  logic        acc_frame;
  logic [KW-1:0] idx;
  logic [AW-1:0] rd_sum;
  logic        rd_h1;

  wire frame_start  = f_valid && f_seq == '0;
  wire frame_end    = f_valid && f_seq == LOG2M_MAX'((1 << log2m) - 1);
  wire accumulating = (st == S_CACC) || (st == S_FACC);
  wire take_frame   = accumulating && skip == '0 && fcnt < target;
  wire acc_now      = frame_start ? take_frame : acc_frame;
  wire acc_first    = frame_start ? (fcnt == '0) : (fidx == '0);
  wire acc_last_end = frame_end && acc_frame && (fidx == target - 1'b1);

  bs_power_est #(.L(L), .LOG2M_MAX(LOG2M_MAX), .DW(DW), .AW(AW)) u_pwr (
    .clk, .log2m, .in_valid(f_valid && acc_now), .din(f_out), .q(f_q), .first(acc_first),
    .thr(mode ? thr_fine : thr_coarse), .rd_idx(idx), .rd_sum, .rd_h1);

  // ---------------- parameter estimation ----------------
  logic pe_clr, pe_valid, pe_d, pe_last, pe_done, pe_found;
  logic [KW:0] pe_bw, pe_c2;
  logic [KW-1:0] pe_start;
  logic [15:0] pe_gaps;
  param_est #(.KW(KW), .X(3)) u_pe (
    .clk, .rst_n, .clr(pe_clr), .in_valid(pe_valid), .d(pe_d), .last_in(pe_last),
    .done(pe_done), .found(pe_found), .bw(pe_bw), .start_bin(pe_start), .c2(pe_c2),
    .gap_fills(pe_gaps));

  // ratio from the coarse bandwidth: largest 2^i <= min(2^RMAX_LOG, K_OSR / b)
  function automatic logic [3:0] ratio_log(input logic [KW:0] b);
    int r;
    r = 0;
    for (int i = 1; i <= RMAX_LOG; i++)
      if ((1 << i) * int'(b) <= K_OSR) r = i;
    return 4'(r);
  endfunction

  wire [KW-1:0] n_last = KW'((1 << (int'(log2m) + $clog2(L))) - 1);

  logic sent_all;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sent_all <= 1'b0;
    else if (pe_clr) sent_all <= 1'b0;
    else if ((st == S_CPASS || st == S_FPASS) && !sent_all && idx == n_last) sent_all <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; mode <= 1'b0; clr_dp <= 1'b0;
      log2m <= 4'(LOG2M_C); log2r <= '0; inc <= '0;
      target <= '0; fcnt <= '0; fidx <= '0; skip <= '0; acc_frame <= 1'b0; idx <= '0;
      pe_clr <= 1'b0; pe_valid <= 1'b0; pe_d <= 1'b0; pe_last <= 1'b0;
      found_c <= 1'b0; bw_c <= '0; c2_c <= '0; found_f <= 1'b0; bw_f <= '0; c2_f <= '0;
      gap_fills <= '0;
    end else begin
      done <= 1'b0; clr_dp <= 1'b0; pe_clr <= 1'b0; pe_valid <= 1'b0; pe_last <= 1'b0;

      if (frame_start && accumulating) begin
        if (skip != '0) skip <= skip - 1'b1;
        acc_frame <= take_frame;
        if (take_frame) begin fidx <= fcnt; fcnt <= fcnt + 1'b1; end
      end
      if (frame_end) acc_frame <= 1'b0;

      case (st)
        S_IDLE: if (start) begin
          st <= S_CACC; busy <= 1'b1; mode <= 1'b0; log2m <= 4'(LOG2M_C); log2r <= '0;
          clr_dp <= 1'b1; skip <= 3'(SKIP); fcnt <= '0; target <= 8'(M_COARSE);
          acc_frame <= 1'b0; found_c <= 1'b0; found_f <= 1'b0; gap_fills <= '0;
        end
        S_CACC: if (acc_last_end) begin st <= S_CPASS; idx <= '0; pe_clr <= 1'b1; end
        S_FACC: if (acc_last_end) begin st <= S_FPASS; idx <= '0; pe_clr <= 1'b1; end
        S_CPASS, S_FPASS: begin
          if (pe_done) begin
            gap_fills <= gap_fills + pe_gaps;
            if (st == S_CPASS) begin
              found_c <= pe_found; bw_c <= pe_bw; c2_c <= pe_c2;
              if (pe_found) st <= S_CFG;
              else begin st <= S_IDLE; busy <= 1'b0; done <= 1'b1; end
            end else begin
              found_f <= pe_found; bw_f <= pe_bw; c2_f <= pe_c2;
              st <= S_IDLE; busy <= 1'b0; done <= 1'b1; mode <= 1'b0;
            end
          end
        end
        S_CFG: begin
          // centre offset in half coarse bins: c2 - N_coarse (DC at index N_coarse/2)
          inc   <= 13'(64 * (int'(c2_c) - (L << LOG2M_C)));
          log2r <= ratio_log(bw_c);
          log2m <= 4'(LOG2M_MAX) - ratio_log(bw_c);
          mode  <= 1'b1; clr_dp <= 1'b1;
          skip  <= 3'(SKIP); fcnt <= '0; target <= 8'(M_FINE); acc_frame <= 1'b0;
          st    <= S_FACC;
        end
        default: st <= S_IDLE;
      endcase

      // decision stream for the parameter estimation (one bin per clock)
      if ((st == S_CPASS || st == S_FPASS) && !pe_clr && !sent_all) begin
        pe_valid <= 1'b1; pe_d <= rd_h1; pe_last <= (idx == n_last);
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
