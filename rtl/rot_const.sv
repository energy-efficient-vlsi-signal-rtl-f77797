// rot_const: constant complex multiplier by W16^e = exp(-j*2*pi*e/16),
// realised with shift-and-add (CSD) constants only: the quadrant part is a
// swap/negate, the residual part uses the 0.9238, 0.7071 and 0.3827 constants.
// W8 and -j rotations (used inside radix-2^2 and radix-2^3 processing units)
// are the even powers of W16. Combinational; a and p are packed {re, im} of
// DW bits each (the package word width). The CSD digits are the published
// ones; the guard bits and rounding are this design's choices.
module rot_const
  import wss_pkg::*;
(
  input  logic [2*DW-1:0] a,
  input  logic [3:0]      e,
  output logic [2*DW-1:0] p
);
  always_comb p = rot16(a, e);
endmodule
