// tb_power_detect: checks the power-detector decision on random positive test statistics and thresholds (pairs closer than 1 % are skipped) and on equal values (no detection).
module tb_power_detect;
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
  fp_t t_stat, gamma; logic h1;
  power_detect dut (.t_stat, .gamma, .h1);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      t_stat = rnd_fp(0); gamma = rnd_fp(0);
      if (i % 3 == 0) gamma.e = t_stat.e;
      #1;
      if (rabs(fpv(t_stat) - fpv(gamma)) > 0.01 * fpv(gamma))
        chk(h1 == (fpv(t_stat) > fpv(gamma)), $sformatf("T=%f g=%f h1=%0d", fpv(t_stat), fpv(gamma), h1));
    end
    t_stat = rnd_fp(0); gamma = t_stat; #1;
    chk(h1 == 1'b0, "equal values detected");
    fin();
  end
  initial begin #100000; failures++; fin(); end
endmodule
