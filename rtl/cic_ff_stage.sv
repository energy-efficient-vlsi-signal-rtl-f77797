// cic_ff_stage: one factor of the feed-forward 4th-order CIC decimator,
//     H(z) = (1 + z^-1)^4 = 1 + 4z^-1 + 6z^-2 + 4z^-3 + z^-4,  then  2:1
// A CIC of order 4 with ratio R = 2^r factors into r such stages, each running
// at half the rate of the one before, with no recursive integrators.
//
// How it works: input vectors carry LI consecutive samples (lane j = sample
// LI*t + j). With LI >= 2 each clock yields LI/2 outputs, lane j computed at
// even sample index 2j from the current vector and the last 4 samples of the
// previous one (kept in a 4-sample history). With LI = 1 the stage works on a
// scalar stream and emits every second sample (phase toggle). The sum
// (gain 16) is rounded and shifted right by IW + 4 - OW.
//
// Interface/timing: en gates the stage (held registers = clock gating in
// the chip); clr empties the history. Output registered, latency 1 clock,
// out_valid once per input vector (LI >= 2) or every second input (LI = 1).
//
// Follows the text: feed-forward 4th-order CIC for power-of-two ratios
// (Fig. 6.12, S = 4), parallel lanes. Own choices: per-stage rescaling to OW
// bits instead of growing wordlengths, the lane arrangement.
//
// Lint notes: the top 4 bits of the tap sum are dropped after the >>4, where the
// result always fits the output width.
module cic_ff_stage #(
  parameter int LI = 16,
  parameter int IW = 14,
  parameter int OW = 14,
  localparam int LO = (LI > 1) ? LI / 2 : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic [LI*2*IW-1:0]   din,
  output logic                 out_valid,
  output logic [LO*2*OW-1:0]   dout
);
  localparam int SW = IW + 4;
  localparam int SH = IW + 4 - OW;

  logic signed [IW-1:0] hr [4], hi [4];    // hr[0] = most recent sample
  logic                 ph;
  logic signed [IW-1:0] xr [LI + 4], xi [LI + 4];
  logic [LO*2*OW-1:0]   y;

  function automatic logic signed [OW-1:0] scale(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] r;
    r = (SH > 0) ? ((v + SW'(1 << (SH > 0 ? SH-1 : 0))) >>> SH) : v;
    return r[OW-1:0];   // the sum of gain 16 fits OW bits after the shift
  endfunction

  always_comb begin
    logic signed [SW-1:0] sr, si;
    int b;
    // samples in time order: 4 history samples then the LI new ones
    for (int i = 0; i < 4; i++) begin xr[i] = hr[3-i]; xi[i] = hi[3-i]; end
    for (int j = 0; j < LI; j++) begin
      xr[4+j] = din[j*2*IW+IW +: IW];
      xi[4+j] = din[j*2*IW +: IW];
    end
    for (int j = 0; j < LO; j++) begin
      b  = (LI > 1) ? 2*j + 4 : 4;        // index of the newest tap
      sr = SW'(xr[b]) + SW'(4 * SW'(xr[b-1])) + SW'(6 * SW'(xr[b-2])) + SW'(4 * SW'(xr[b-3])) + SW'(xr[b-4]);
      si = SW'(xi[b]) + SW'(4 * SW'(xi[b-1])) + SW'(6 * SW'(xi[b-2])) + SW'(4 * SW'(xi[b-3])) + SW'(xi[b-4]);
      y[j*2*OW+OW +: OW] = scale(sr);
      y[j*2*OW +: OW]    = scale(si);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin hr[i] <= '0; hi[i] <= '0; end
      ph <= 1'b0; out_valid <= 1'b0; dout <= '0;
    end else if (clr) begin
      for (int i = 0; i < 4; i++) begin hr[i] <= '0; hi[i] <= '0; end
      ph <= 1'b0; out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < 4; i++) begin
          hr[i] <= xr[LI + 3 - i];
          hi[i] <= xi[LI + 3 - i];
        end
        if (LI > 1 || ph) begin out_valid <= 1'b1; dout <= y; end
        ph <= ~ph;
      end
    end else begin
      out_valid <= 1'b0;
    end
  end
endmodule
