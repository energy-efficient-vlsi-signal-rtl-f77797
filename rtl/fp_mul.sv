// fp_mul: floating-point multiplier. Exponents are added and mantissas
// multiplied with ordinary two's-complement operators; no alignment is
// needed. The 20-bit product is renormalised to 10 bits (truncating).
// With the package bias, value = (Ma Mb) 2^(Ea + Eb + 16 + 16 - SH); SH lets a
// caller give one operand an implied binary scale. Combinational.
module fp_mul
  import wss_pkg::*;
#(
  parameter int SH = 0    // extra scale 2^-SH folded into the exponent
) (
  input  fp_t a,
  input  fp_t b,
  output fp_t p
);
  logic signed [2*MW-1:0] pm;
  always_comb begin
    pm = (2*MW)'(a.m) * (2*MW)'(b.m);
    p  = fp_norm(48'(pm), int'(a.e) + int'(b.e) + FP_BIAS - SH);
  end
endmodule
