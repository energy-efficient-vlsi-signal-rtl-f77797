// fp_sq: floating-point squarer, the special case of fp_mul with both
// operands equal: the exponent is shifted left by one and the mantissa is
// squared, then renormalised. Combinational.
module fp_sq
  import wss_pkg::*;
(
  input  fp_t a,
  output fp_t p
);
  logic signed [2*MW-1:0] pm;
  always_comb begin
    pm = (2*MW)'(a.m) * (2*MW)'(a.m);
    p  = fp_norm(48'(pm), (int'(a.e) <<< 1) + FP_BIAS);
  end
endmodule
