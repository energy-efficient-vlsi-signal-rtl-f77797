// tb_dta: checks the detection-threshold adaptation unit: gamma must equal (1.3626*sqrt(M)+M)*(svf+sif) within 2 % for random M and powers.
module tb_dta;
  import wss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
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
  initial begin #2000000; $display("watchdog"); failures++; fin(); end
  logic start = 0, busy, done; logic [15:0] mk; fp_t svf, sif, gamma;
  dta dut (.clk, .rst_n, .start, .mk, .svf, .sif, .busy, .done, .gamma);
  initial begin
    real g;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      mk = 16'(1 + $urandom_range(9764)) >> $urandom_range(12); if (mk == 0) mk = 1;
      svf.m = MW'(256 + $urandom_range(255)); svf.e = EW'(int'($urandom_range(8)) - 12);
      sif.m = MW'(256 + $urandom_range(255)); sif.e = EW'(int'(svf.e) - 3 + int'($urandom_range(4)));
      if (i % 5 == 0) sif = FP_ZERO;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      g = (1.3626 * $sqrt(real'(mk)) + real'(mk)) * (fpv(svf) + fpv(sif));
      chk(rabs(fpv(gamma) - g) <= 0.02 * g, $sformatf("M=%0d gamma %g expected %g", mk, fpv(gamma), g));
    end
    fin();
  end
endmodule
