// sta: sensing-time adaptation. For one channel k it computes the number of
// FFT frames to average,
//     psi  = sigma_if^2(k) / sigma_vf^2(k)          (interference-to-noise)
//     M(k) = ceil( C_K * (C_0 + psi)^2 ),  clamped to [1, MMAX],
// which is the closed form of the required sensing time once the target
// P_FA, P_D and SNR are fixed (C_K = 74.25 and C_0 = 1.15 for P_FA = 0.1,
// P_D = 0.9, SNR = -5 dB). The division is a Newton-Raphson reciprocal of
// the noise mantissa (nr_recip) followed by a multiply; psi is kept as a
// 10-bit number with 4 integer bits (Q4.6, saturating), enough for the
// precision of M(k). The constants are applied as fixed multiplications
// (shift-and-add after synthesis).
//
// Interface: pulse start with sif, svf (floating point, per-frame powers)
// valid; warm lets the reciprocal reuse the previous result. done pulses
// with mk (frames) and psi valid. 2 clocks plus the reciprocal iterations.
// MMAX defaults to the 50 ms sensing-time limit: 50 ms * 200 MS/s / 1024.
//
// Lint notes: only the exponent of the quantised noise power is used for the
// range check; its mantissa goes through the reciprocal instead.
module sta
  import wss_pkg::*;
#(
  parameter int MMAX  = 9765,
  parameter int C_K_Q2 = 297,   // 74.25 * 4
  parameter int C0_Q8  = 294    // 1.15 * 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        warm,
  input  fp_t         sif,
  input  fp_t         svf,
  output logic        busy,
  output logic        done,
  output logic [15:0] mk,
  output logic [9:0]  psi,
  output logic        warm_used
);
  logic        r_busy, r_done;
  logic [17:0] r_y;
  logic [3:0]  r_sh;
  fp_t         sif_q, svf_q;
  logic        run;

  nr_recip u_recip (
    .clk, .rst_n, .start(start && !run), .warm, .m(svf.m), .busy(r_busy),
    .done(r_done), .y(r_y), .sh(r_sh), .warm_used);

  logic [35:0] prod;
  logic signed [31:0] shv;
  logic [47:0] psi_w;
  logic [9:0]  psi_c;
  logic [15:0] u;
  logic [47:0] m_q16;
  logic [31:0] m_int;
  logic [15:0] mk_c;

  always_comb begin
    prod  = (sif_q.m[MW-1]) ? '0 : 36'(sif_q.m) * 36'(r_y);
    shv   = int'(sif_q.e) - int'(svf_q.e) + int'(r_sh) - 18;
    if (shv >= 0) psi_w = (shv > 20) ? '1 : (48'(prod) << shv);
    else          psi_w = (-shv > 47) ? '0 : (48'(prod) >> (-shv));
    psi_c = (psi_w > 48'd1023) ? 10'd1023 : psi_w[9:0];
    u     = 16'(psi_c) * 16'd4 + 16'(C0_Q8);
    m_q16 = (48'(u) * 48'(u) * 48'(C_K_Q2)) >> 2;
    m_int = 32'((m_q16 + 48'hFFFF) >> 16);
    if (m_int > 32'(MMAX)) mk_c = 16'(MMAX);
    else if (m_int == 0)   mk_c = 16'd1;
    else                   mk_c = m_int[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; mk <= '0; psi <= '0;
      sif_q <= FP_ZERO; svf_q <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; sif_q <= sif; svf_q <= svf;
      end else if (run && r_done) begin
        run <= 1'b0; done <= 1'b1; mk <= mk_c; psi <= psi_c;
      end
    end
  end
  assign busy = run || r_busy;
  logic unused;
  assign unused = r_busy;
endmodule
