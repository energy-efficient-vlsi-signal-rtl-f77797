// fx2fp: fixed-point to floating-point converter. A priority encoder finds
// the leading one of the unsigned input (the run of zeros above it becomes
// the exponent) and a barrel shifter moves the next bits into the 10-bit
// mantissa. FRAC gives the number of fraction bits of the input.
// Output {m, e} with value m * 2^(e + 16) = din * 2^-FRAC (package format).
// Combinational.
module fx2fp
  import wss_pkg::*;
#(
  parameter int IN_W = 40,
  parameter int FRAC = 0
) (
  input  logic [IN_W-1:0] din,
  output fp_t             dout
);
  always_comb dout = fp_norm(48'(din), -FP_BIAS - FRAC);
endmodule
