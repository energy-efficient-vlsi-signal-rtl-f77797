// tb_fp_add: checks the floating-point adder on random signed operands against real arithmetic (error below two mantissa steps of the larger operand), including cancellation and operands far apart.
module tb_fp_add;
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
  fp_t a, b, s;
  fp_add dut (.a, .b, .s);
  initial begin
    real ref_v, tol;
    for (int i = 0; i < 3000; i++) begin
      a = rnd_fp(1); b = rnd_fp(1);
      if (i % 7 == 0) b = fp_neg(a);
      if (i % 11 == 0) b.e = a.e;
      #1;
      ref_v = fpv(a) + fpv(b);
      tol = (rabs(fpv(a)) > rabs(fpv(b)) ? rabs(fpv(a)) : rabs(fpv(b))) / 128.0;
      chk(rabs(fpv(s) - ref_v) <= tol, $sformatf("%f + %f = %f", fpv(a), fpv(b), fpv(s)));
    end
    fin();
  end
  initial begin #100000; failures++; fin(); end
endmodule
