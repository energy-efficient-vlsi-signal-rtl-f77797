// power_est: per-bin power estimation behind the parallel FFT. For every FFT
// output beat it squares the L bins (|X|^2 = re^2 + im^2) and adds them to a
// per-bin running sum, or loads the sum when `first` is set (first frame of an
// averaging run). Each lane has its own gate `en[p]`, which lets the sequencer
// average every channel over its own number of frames M(k).
//
// How it works: output lane p of the FFT carries bin k = q + T p (T = N/L
// beats per frame), so the sums are kept in L banks of T words, bank p
// addressed by q. Each bin is visited once per frame, so the read-modify-write
// of a word never collides with itself. One asynchronous read port (rd_bin)
// serves the sequencer's serial passes over the spectrum.
//
// Interface/timing: in_valid/din/q/first/en are sampled on the same clock; the
// updated sum is visible on the read port from the next clock. din holds L
// complex values {re, im} of DW bits.
//
// Follows the text: squaring and accumulation of the 1024 FFT outputs in
// memory banks (Section 5.2). Own choice: the running sums are exact AW-bit
// integers. A 10-bit-mantissa floating-point accumulator stops growing once
// the sum is about 2^9 times a single frame's power, well below the up to
// 9765 frames of a 50 ms sensing time; the sequencer converts finished sums to
// the 10/5-bit floating-point format for storage and the adaptation blocks.
module power_est #(
  parameter int L  = 8,
  parameter int N  = 1024,
  parameter int DW = 24,
  parameter int AW = 64
) (
  input  logic                 clk,
  input  logic                 in_valid,
  input  logic [L*2*DW-1:0]    din,
  input  logic [$clog2(N/L)-1:0] q,
  input  logic                 first,
  input  logic [L-1:0]         en,
  input  logic [$clog2(N)-1:0] rd_bin,
  output logic [AW-1:0]        rd_sum
);
  localparam int T  = N / L;
  localparam int TW = $clog2(T);

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
        if (en[p]) acc[p][q] <= first ? pw[p] : acc[p][q] + pw[p];
  end

  assign rd_sum = acc[rd_bin[$clog2(N)-1:TW]][rd_bin[TW-1:0]];
endmodule
