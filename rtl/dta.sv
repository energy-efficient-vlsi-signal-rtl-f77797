// dta: detection-threshold adaptation. For one channel k:
//     gamma(k) = ( QSA * sqrt(M(k)) + M(k) ) * ( sigma_vf^2(k) + sigma_if^2(k) )
// with QSA = Q^-1(P_FA) * sqrt(alpha), a pre-computed constant (1.3626 for
// P_FA = 0.1 and the alpha implied by C_K of the sensing-time adaptation).
// The threshold applies to the sum of |X(k)|^2 over the M(k) frames.
// sqrt(M) comes from the Newton-Raphson square root; the bracket is formed in
// fixed point (Q.8), converted to floating point (fx2fp) and multiplied by
// the floating-point noise-plus-interference power (fp_add, fp_mul with the 2^-8 folded into the exponent).
//
// Interface: pulse start with mk, svf, sif valid; done pulses with gamma.
module dta
  import wss_pkg::*;
#(
  parameter int QSA_Q10 = 1395
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] mk,
  input  fp_t         svf,
  input  fp_t         sif,
  output logic        busy,
  output logic        done,
  output fp_t         gamma
);
  logic        q_busy, q_done, run;
  logic [16:0] root;
  logic [15:0] mk_q;
  fp_t         svf_q, sif_q, s0, tf, g;
  logic [39:0] t_q8;

  nr_sqrt u_sqrt (.clk, .rst_n, .start(start && !run), .din(mk), .busy(q_busy),
                  .done(q_done), .root);

  always_comb t_q8 = ((40'(root) * 40'(QSA_Q10)) >> 10) + (40'(mk_q) << 8);
  // t*256 is converted as an integer and the scale is removed after the
  // product: the float format has no fractional range (EMIN gives a step of 1)
  fx2fp #(.IN_W(40), .FRAC(0)) u_cvt (.din(t_q8), .dout(tf));
  fp_add u_add (.a(svf_q), .b(sif_q), .s(s0));
  // product normalised once, with the 2^-8 of t folded into the exponent
  fp_mul #(.SH(8)) u_mul (.a(tf), .b(s0), .p(g));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; gamma <= FP_ZERO; mk_q <= '0;
      svf_q <= FP_ZERO; sif_q <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; mk_q <= mk; svf_q <= svf; sif_q <= sif;
      end else if (run && q_done) begin
        run <= 1'b0; done <= 1'b1; gamma <= g;
      end
    end
  end
  assign busy = run || q_busy;
endmodule
