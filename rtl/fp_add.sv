// fp_add: floating-point adder built from two's-complement operators.
// The operand with the larger exponent is selected by the swap multiplexers,
// the exponent difference drives a barrel shifter that aligns the other
// mantissa, and the mantissas are added: M1 2^E1 + M2 2^E2 =
// (M1 + M2 2^(E2-E1)) 2^E1 for E1 >= E2. The sum is renormalised (one right
// shift on overflow, left shifts after cancellation), which keeps results
// in the 10/5-bit format. Combinational.
module fp_add
  import wss_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t s
);
  fp_t big, sml;
  logic [5:0] d;
  logic signed [MW:0] sm, sum;
  always_comb begin
    if (a.e >= b.e) begin big = a; sml = b; end
    else            begin big = b; sml = a; end
    d   = 6'(7'(big.e) - 7'(sml.e));
    sm  = (MW+1)'(sml.m) >>> d;
    sum = (MW+1)'(big.m) + sm;
    s   = fp_norm(48'(sum), int'(big.e));
  end
endmodule
