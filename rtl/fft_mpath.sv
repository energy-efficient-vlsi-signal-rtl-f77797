// fft_mpath: multi-path pipelined FFT (N = L x M points).
//
// The input arrives L samples per clock: lane l carries x[L m + l]. Each lane
// runs its own M-point SDF FFT (fft_lane) over m, giving Y_l[q] in
// bit-reversed order, all lanes in lock-step. Lane l is then multiplied by
// the inter-path twiddle W_N^(l q) (generated, full multiplier) and an
// L-point parallel FFT across the lanes gives
//     X[q + M p] = sum_l W_L^(l p) W_N^(l q) Y_l[q]   on output lane p.
// This is the decomposition that lets one L-point parallel FFT replace L
// separate L-point FFTs and lets every path run at 1/L of the sample rate.
//
// Chip 1 uses L = 8, M = 128 (radix-2^2/2^2/2^3 paths): 1024 points.
// Chip 2 uses L = 16, M = 4..512 chosen at run time (RECONF = 1, radix-2
// paths): 64..8192 points.
//
// Interface: log2m selects the path size (ignored unless RECONF), clr
// restarts the frame counters after a size change. out_q is the bin index q
// of the current output beat, out_seq its position in the frame (0 at the
// first beat of a frame). Latency: fft_lane latency + 2 clocks.
//
// Lint notes: only lane 0's valid and beat count are used; all lanes run in
// lockstep, so the others are identical copies.
module fft_mpath
  import wss_pkg::*;
#(
  parameter int L      = 8,
  parameter int LOG2M  = 7,
  parameter bit RECONF = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [3:0]          log2m,
  input  logic                in_valid,
  input  logic [L*2*DW-1:0]   din,
  output logic                out_valid,
  output logic [L*2*DW-1:0]   dout,
  output logic [LOG2M-1:0]    out_q,
  output logic [LOG2M-1:0]    out_seq
);
  localparam int LL = $clog2(L);
  localparam int PW = LL + LOG2M;
  localparam logic [15:0] GE = RECONF ? 16'hFFFF
                             : ((LOG2M == 7) ? 16'b1001010 : 16'hFFFF);

  logic [3:0]        lm;
  logic [L-1:0]      lv;
  logic [2*DW-1:0]   ld [L];
  logic [LOG2M-1:0]  lq, lseq;
  logic [L-1:0]      tv;
  logic [L*2*DW-1:0] tdat;
  logic [LOG2M-1:0]  q1, q2, s1, s2;

  assign lm = RECONF ? log2m : 4'(LOG2M);

  for (genvar l = 0; l < L; l++) begin : g_lane
    logic [LOG2M-1:0] sq, iq;
    fft_lane #(.LOG2N(LOG2M), .GROUP_END(GE)) u_lane (
      .clk, .rst_n, .clr, .log2n(lm), .in_valid, .din(din[l*2*DW +: 2*DW]),
      .out_valid(lv[l]), .dout(ld[l]), .out_seq(sq), .out_idx(iq));
    if (l == 0) begin : g_idx
      assign lq   = iq;
      assign lseq = sq;
    end
    if (l == 0) begin : g_pass
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          tv[0] <= 1'b0;
          tdat[0 +: 2*DW] <= '0;
        end else begin
          tv[0] <= lv[0];
          if (lv[0]) tdat[0 +: 2*DW] <= ld[0];
        end
      end
    end else begin : g_tw
      logic [PW-1:0] ph;
      logic signed [TW-1:0] wc, ws;
      always_comb ph = PW'((l * int'(iq)) << (LOG2M - int'(lm)));
      twiddle_gen #(.PW(PW), .TW(TW)) u_tw (.phase(ph), .cos_o(wc), .sin_o(ws));
      cmul3 #(.DW(DW), .TW(TW)) u_mul (
        .clk, .rst_n, .in_valid(lv[l]), .a(ld[l]), .w({wc, -ws}),
        .out_valid(tv[l]), .p(tdat[l*2*DW +: 2*DW]));
    end
  end

  fft_par #(.L(L)) u_par (
    .clk, .rst_n, .in_valid(tv[0]), .din(tdat), .out_valid(out_valid), .dout(dout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; s1 <= '0; s2 <= '0;
    end else begin
      q1 <= lq; q2 <= q1;
      s1 <= lseq; s2 <= s1;
    end
  end
  assign out_q   = q2;
  assign out_seq = s2;
endmodule
