// multitap_window: time-domain part of the multitap-windowed FFT power
// detector. Frame m of the FFT input is
//     y_m[n] = sum_{p=0}^{P-1} w[n + pN] * x[n + pN + mN],   n = 0..N-1
// i.e. a window P times longer than the FFT is applied and its P segments are
// overlapped and added, so a single N-point FFT keeps the frequency resolution
// while the long window suppresses leakage from strong neighbours. Frames
// advance by N samples, so each input block takes part in P frames.
//
// How it works: samples arrive L per clock (lane l carries x[L t + l]); a block
// of N samples takes T = N/L beats. The previous P-1 blocks are held in a
// register-file history (one entry per beat, a shift from tap to tap on every
// beat). On each beat the current block is tap P-1, the one before it tap P-2
// and so on, so every lane forms P products with coefficients
// w[p N + t L + l] and sums them. Output starts once P-1 blocks are stored.
//
// Coefficients: P*N unsigned Q1.(CW-1) values in a writable memory (one write
// per clock on coef_we, address p*N + n). The memory has no reset: the host
// loads the window (normalised as in the text, (1/N) sum |w|^2 = 1) before
// the first run.
//
// Interface/timing: din holds L complex samples {re, im} of IW bits; dout holds
// L complex samples {re, im} of DW bits, registered (latency 1 clock), in the
// same lane order. Output scaling: sum >>> (CW-2), i.e. one fractional bit,
// which keeps a full-scale tone inside DW = 24 bits after the 1024-point FFT.
// clr restarts the block counter and discards the history (used when a new
// sensing run starts).
//
// Follows the text: Eq. (3.2), P = 2 taps (Table 3.2), N = 1024, 8-way
// parallel input at 200 MS/s. Own choices: 12-bit input and coefficient
// widths, the output scaling and the register-file history.
module multitap_window #(
  parameter int P  = 2,
  parameter int N  = 1024,
  parameter int L  = 8,
  parameter int IW = 12,
  parameter int CW = 12,
  parameter int DW = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       coef_we,
  input  logic [$clog2(P*N)-1:0]     coef_addr,
  input  logic [CW-1:0]              coef_din,
  input  logic                       in_valid,
  input  logic [L*2*IW-1:0]          din,
  output logic                       out_valid,
  output logic [L*2*DW-1:0]          dout
);
  localparam int T  = N / L;
  localparam int TW = $clog2(T);
  localparam int PW = (P > 1) ? $clog2(P) + 1 : 1;
  localparam int SW = IW + CW + PW + 1;

  logic [CW-1:0]       coef [P*N];
  logic [L*2*IW-1:0]   hist [P > 1 ? P-1 : 1][T];
  logic [TW-1:0]       t;
  logic [PW-1:0]       nblk;   // blocks seen, saturating at P-1
  logic [L*2*DW-1:0]   y;

  // coefficient memory (no reset: a memory macro, loaded by the host)
  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_din;
  end

  // windowed overlap-add of the P taps
  always_comb begin
    logic signed [SW-1:0] ar, ai;
    logic signed [IW-1:0] xr, xi;
    logic [L*2*IW-1:0]    blkv;
    logic signed [CW:0]   wc;
    for (int l = 0; l < L; l++) begin
      ar = '0; ai = '0;
      for (int p = 0; p < P; p++) begin
        blkv = (p == P-1) ? din : hist[(P > 1) ? P-2-p : 0][t];
        xr   = blkv[l*2*IW+IW +: IW];
        xi   = blkv[l*2*IW +: IW];
        wc   = $signed({1'b0, coef[p*N + int'(t)*L + l]});
        ar   = ar + SW'(xr * wc);
        ai   = ai + SW'(xi * wc);
      end
      y[l*2*DW+DW +: DW] = DW'((ar + SW'(1 << (CW-3))) >>> (CW-2));
      y[l*2*DW +: DW]    = DW'((ai + SW'(1 << (CW-3))) >>> (CW-2));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; nblk <= '0; out_valid <= 1'b0; dout <= '0;
    end else if (clr) begin
      t <= '0; nblk <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (int'(nblk) >= P-1);
      if (in_valid) begin
        dout <= y;
        t    <= t + 1'b1;
        if (t == TW'(T-1) && int'(nblk) < P-1) nblk <= nblk + 1'b1;
      end
    end
  end

  // history shift: tap p receives tap p-1 (tap 0 receives the current block)
  always_ff @(posedge clk) begin
    if (in_valid && !clr) begin
      for (int p = 0; p < P-1; p++)
        hist[p][t] <= (p == 0) ? din : hist[(p > 0) ? p-1 : 0][t];
    end
  end
endmodule
