// tb_fp_sq: checks the floating-point squarer on random operands against real arithmetic (relative error below 2^-7).
module tb_fp_sq;
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
  fp_t a, p;
  fp_sq dut (.a, .p);
  initial begin
    real ref_v;
    for (int i = 0; i < 2000; i++) begin
      a = rnd_fp(1);
      a.e = EW'(int'($urandom_range(14)) - 16);
      #1;
      ref_v = fpv(a) * fpv(a);
      if (rabs(ref_v) >= 511.0 * $pow(2.0, real'(EMAX + FP_BIAS)))
        chk(rabs(fpv(p)) >= 510.0 * $pow(2.0, real'(EMAX + FP_BIAS)) && (fpv(p) > 0) == (ref_v > 0), "no saturation");
      else
        chk(rabs(fpv(p) - ref_v) <= ref_v / 128.0, $sformatf("%f^2 = %f", fpv(a), fpv(p)));
    end
    fin();
  end
  initial begin #100000; failures++; fin(); end
endmodule
