// nr_recip: Newton-Raphson reciprocal of a positive floating-point mantissa.
//
// The mantissa m is first brought into [384, 768) by left shifts (shift count
// sh), so that d = m*2^sh/512 lies in [0.75, 1.5) and the fixed initial value
// y0 = 1 (that is 1/512 in mantissa units) is within the convergence range.
// Each clock performs one iteration y <- y (2 - d y) in Q2.15 with one
// register in the loop; the error squares every iteration, so ITER = 4
// iterations give more than the 10 bits needed.
// Warm start: when warm is set and the shift count equals that of the
// previous call, the previous result seeds the loop and only ITER_WARM
// iterations run (the noise power varies little from bin to bin).
//
// Interface: pulse start with m valid; done pulses when y (Q2.15,
// y ~ 512 / (m 2^sh)) and sh are valid. busy is high in between.
module nr_recip
  import wss_pkg::*;
#(
  parameter int ITER      = 4,
  parameter int ITER_WARM = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               warm,
  input  logic [MW-1:0]      m,
  output logic               busy,
  output logic               done,
  output logic [17:0]        y,
  output logic [3:0]         sh,
  output logic               warm_used
);
  logic [3:0]  it;
  logic [16:0] d;
  logic [3:0]  sh_n, sh_prev;
  logic [9:0]  m2;
  logic        have_prev;
  logic [35:0] dy;
  logic [17:0] two_m;
  logic [35:0] yn;

  always_comb begin
    m2   = m;
    sh_n = '0;
    for (int i = 0; i < 9; i++)
      if (m2 < 10'd384 && m2 != '0) begin m2 = m2 << 1; sh_n = sh_n + 1'b1; end
    dy    = 36'(d) * 36'(y);
    two_m = 18'(2 << 15) - 18'(dy >> 15);
    yn    = 36'(y) * 36'(two_m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it <= '0; busy <= 1'b0; done <= 1'b0; y <= '0; d <= '0;
      sh <= '0; sh_prev <= '0; have_prev <= 1'b0; warm_used <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        d    <= 17'(m2) << 6;
        sh   <= sh_n;
        if (warm && have_prev && sh_n == sh_prev) begin
          it <= 4'(ITER_WARM); warm_used <= 1'b1;
        end else begin
          y  <= 18'(1 << 15);
          it <= 4'(ITER); warm_used <= 1'b0;
        end
      end else if (busy) begin
        if (it != '0) begin
          y  <= 18'(yn >> 15);
          it <= it - 1'b1;
        end else begin
          busy <= 1'b0; done <= 1'b1;
          sh_prev <= sh; have_prev <= 1'b1;
        end
      end
    end
  end
endmodule
