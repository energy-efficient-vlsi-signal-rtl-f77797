// tb_fp_mul: checks the floating-point multiplier on random signed operands against real arithmetic (relative error below 2^-7) and the normalisation of the product.
module tb_fp_mul;
  import wss_pkg::*;
  int checks = 0, failures = 0;
  function automatic real fpv(input fp_t x);
    return real'(x.m) * $pow(2.0, real'(int'(x.e) + FP_BIAS));
  endfunction
  function automatic real rabs(input real x);
    return x < 0 ? -x : x;
  endfunction
  task automatic fin();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic fp_t rnd_fp(input bit neg);
    fp_t r;
    r.m = MW'(256 + $urandom_range(255));
    if (neg && $urandom_range(1)) r.m = -r.m;
    r.e = EW'(int'($urandom_range(20)) - 14);
    return r;
  endfunction
  fp_t a, b, p;
  fp_mul dut (.a, .b, .p);
  initial begin
    real ref_v;
    for (int i = 0; i < 3000; i++) begin
      a = rnd_fp(1); b = rnd_fp(1);
      a.e = EW'(int'($urandom_range(14)) - 16); b.e = EW'(int'($urandom_range(14)) - 8);
      #1;
      ref_v = fpv(a) * fpv(b);
      if (rabs(ref_v) >= 511.0 * $pow(2.0, real'(EMAX + FP_BIAS)))
        chk(rabs(fpv(p)) >= 510.0 * $pow(2.0, real'(EMAX + FP_BIAS)) && (fpv(p) > 0) == (ref_v > 0), "no saturation");
      else
        chk(rabs(fpv(p) - ref_v) <= rabs(ref_v) / 128.0, $sformatf("%f * %f = %f", fpv(a), fpv(b), fpv(p)));
      chk(p.m >= 256 || p.m <= -256, "product not normalised");
    end
    fin();
  end
  initial begin #100000; failures++; fin(); end
endmodule
