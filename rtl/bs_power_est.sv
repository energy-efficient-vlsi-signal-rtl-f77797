// bs_power_est: power estimation and per-bin decision of the band
// segmentation processor. Accumulates |X(k)|^2 over the frames of a sensing
// run for a reconfigurable FFT size N = L * 2^log2m and compares each sum with
// the programmed threshold.
//
// How it works: lane p of the L-path FFT carries bin k = q + M p (M = 2^log2m),
// so the sums live in L banks of up to 2^LOG2M_MAX words, bank p addressed by
// q. The read port takes the bin in spectrum order (index 0 = -F_s/2, i.e.
// FFT-shifted: bin = (idx + N/2) mod N), so a serial pass over idx delivers
// the decisions in frequency order for the parameter estimation.
//
// Interface/timing: in_valid/din/q/first sampled together (first loads instead
// of adding); rd_idx -> rd_sum/rd_h1 combinational, rd_h1 = (rd_sum > thr).
// thr is the decision threshold for the full sum (the normalised threshold
// gamma_0 times M times the noise power, computed off-line in the text).
//
// Follows the text: power estimation after the reconfigurable FFT, binary
// decisions against a threshold computed off-line. Own choices: exact AW-bit
// fixed-point sums and a single threshold per run.
module bs_power_est #(
  parameter int L         = 16,
  parameter int LOG2M_MAX = 9,
  parameter int DW        = 24,
  parameter int AW        = 56
) (
  input  logic                          clk,
  input  logic [3:0]                    log2m,
  input  logic                          in_valid,
  input  logic [L*2*DW-1:0]             din,
  input  logic [LOG2M_MAX-1:0]          q,
  input  logic                          first,
  input  logic [AW-1:0]                 thr,
  input  logic [LOG2M_MAX+$clog2(L)-1:0] rd_idx,
  output logic [AW-1:0]                 rd_sum,
  output logic                          rd_h1
);
  localparam int T  = 1 << LOG2M_MAX;
  localparam int KW = LOG2M_MAX + $clog2(L);

  logic [AW-1:0] acc [L][T];
  logic [AW-1:0] pw  [L];

  always_comb begin
    logic signed [DW-1:0]   xr, xi;
    logic signed [2*DW-1:0] sr, si;
    for (int p = 0; p < L; p++) begin
      xr    = din[p*2*DW+DW +: DW];
      xi    = din[p*2*DW +: DW];
      sr    = xr * xr;
      si    = xi * xi;
      pw[p] = AW'($unsigned(sr)) + AW'($unsigned(si));
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int p = 0; p < L; p++)
        acc[p][q] <= first ? pw[p] : acc[p][q] + pw[p];
  end

  logic [KW-1:0] nmask, bin;
  logic [$clog2(L)-1:0]  bank;
  logic [LOG2M_MAX-1:0] addr;
  always_comb begin
    nmask  = KW'((1 << (int'(log2m) + $clog2(L))) - 1);
    bin    = (rd_idx + KW'(1 << (int'(log2m) + $clog2(L) - 1))) & nmask;
    bank   = $clog2(L)'(bin >> log2m);
    addr   = LOG2M_MAX'(bin & KW'((1 << log2m) - 1));
    rd_sum = acc[bank][addr];
    rd_h1  = rd_sum > thr;
  end
endmodule
