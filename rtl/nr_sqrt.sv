// nr_sqrt: square root of a 16-bit integer by Newton-Raphson iteration on
// the inverse square root, which needs multipliers only (no divider):
//     r <- r (3 - m r^2) / 2,   sqrt(m) = m r.
// The input is normalised to m = M / 4^s in [0.25, 1) (priority encoder),
// started from r0 = 1.5 and iterated ITER times (one iteration per clock),
// and the result is shifted back by s.
//
// Interface: pulse start with din valid; done pulses with root valid,
// an unsigned Q9.8 number (sqrt(din) with 8 fraction bits).
//
// Lint notes: only the low bits of the wide intermediate product are kept, which
// hold the whole result after the shift.
module nr_sqrt #(
  parameter int ITER = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] din,
  output logic        busy,
  output logic        done,
  output logic [16:0] root
);
  logic [3:0]  it;
  logic [4:0]  s, s_n;
  logic [17:0] m, m_n;      // Q.16, in [0.25, 1)
  logic [18:0] r;           // Q.16, in (1, 2]
  logic [63:0] r2, mr2, t, rn, mr;
  logic [31:0] p;

  always_comb begin
    p = 0;
    for (int i = 0; i < 16; i++) if (din[i]) p = i;
    s_n = 5'((p + 2) / 2);
    m_n = 18'((64'(din) << 16) >> (2 * s_n));
    r2  = (64'(r) * 64'(r)) >> 16;
    mr2 = (64'(m) * r2) >> 16;
    t   = (64'(3) << 16) - mr2;
    rn  = (64'(r) * t) >> 17;
    mr  = 64'(m) * 64'(r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it <= '0; s <= '0; m <= '0; r <= '0; busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; it <= 4'(ITER); s <= s_n; m <= m_n;
        r <= 19'(3 << 15);
        if (din == '0) begin busy <= 1'b0; done <= 1'b1; root <= '0; end
      end else if (busy) begin
        if (it != '0) begin
          r  <= 19'(rn);
          it <= it - 1'b1;
        end else begin
          busy <= 1'b0; done <= 1'b1;
          root <= 17'((mr << s) >> 24);
        end
      end
    end
  end
endmodule
