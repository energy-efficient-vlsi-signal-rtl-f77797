// power_detect: per-bin decision of the power detector, H1 when the test
// statistic T(k) (sum of |X(k)|^2 over the M(k) frames) exceeds the
// adapted threshold gamma(k). The comparison subtracts the two floating-point
// numbers with fp_add and tests the sign of the result, so it needs no
// separate comparator. Combinational.
//
// Lint notes: only the sign bit and mantissa of the difference are needed.
module power_detect
  import wss_pkg::*;
(
  input  fp_t  t_stat,
  input  fp_t  gamma,
  output logic h1
);
  fp_t diff;
  fp_add u_sub (.a(t_stat), .b(fp_neg(gamma)), .s(diff));
  assign h1 = !diff.m[MW-1] && (diff.m != '0);
endmodule
