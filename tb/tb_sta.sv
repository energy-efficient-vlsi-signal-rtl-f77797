// tb_sta: checks the spectral-temporal adaptation unit: for random interference and noise powers the number of averaged frames must match ceil(74.25*(1.15+psi)^2) with psi = sif/svf rounded to the unit's 1/64 step, clamped to [1, 9765]. Also counts warm starts on consecutive calls.
module tb_sta;
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
  logic start = 0, warm = 0, busy, done, warm_used;
  fp_t sif, svf; logic [15:0] mk; logic [9:0] psi;
  int nwarm = 0;
  sta dut (.clk, .rst_n, .start, .warm, .sif, .svf, .busy, .done, .mk, .psi, .warm_used);
  function automatic int mref(input real p);
    real v; int r;
    v = 74.25 * (1.15 + p) * (1.15 + p);
    r = int'($ceil(v));
    if (r > 9765) r = 9765;
    return r;
  endfunction
  initial begin
    real ps; int lo, hi;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      if (i % 2 == 0) begin
        svf.m = MW'(256 + $urandom_range(255)); svf.e = EW'(int'($urandom_range(10)) - 8);
      end else
        // noise floor varies slowly between neighbouring bins
        svf.m = svf.m + MW'($urandom_range(2)) - MW'(1);
      sif.m = MW'(256 + $urandom_range(255));
      sif.e = EW'(int'(svf.e) - 4 + int'($urandom_range(6)));
      if (i % 17 == 0) sif = FP_ZERO;
      @(negedge clk); warm = (i % 2 == 1); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      if (warm_used) nwarm++;
      ps = fpv(sif) / fpv(svf);
      if (ps > 1023.0 / 64) ps = 1023.0 / 64;
      lo = mref(ps - 1.5 / 64); if (lo < 1) lo = 1;
      hi = mref(ps + 1.0 / 64);
      chk(mk >= lo && mk <= hi, $sformatf("psi=%f mk=%0d expected %0d..%0d", ps, mk, lo, hi));
      chk(rabs(real'(psi) / 64 - ps) <= 2.0 / 64, $sformatf("psi %0d vs %f", psi, ps));
    end
    chk(nwarm > 100, $sformatf("warm starts %0d", nwarm));
    fin();
  end
endmodule
