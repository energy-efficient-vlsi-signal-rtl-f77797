// tb_nr_sqrt: checks the Newton-Raphson square root on random 16-bit integers and on the corner values 0, 1 and 65535: root (Q9.8) must be within 0.5 % plus 2 LSB of the true root.
module tb_nr_sqrt;
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
  logic start = 0, busy, done; logic [15:0] din; logic [16:0] root;
  nr_sqrt dut (.clk, .rst_n, .start, .din, .busy, .done, .root);
  initial begin
    int v; real rs;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      v = (i < 3) ? ((i == 0) ? 0 : (i == 1) ? 1 : 65535) : $urandom_range(65535) >> $urandom_range(15);
      @(negedge clk); din = 16'(v); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      rs = $sqrt(real'(v));
      chk(rabs(real'(root) / 256.0 - rs) <= 0.005 * rs + 2.0 / 256, $sformatf("sqrt(%0d)=%f got %f", v, rs, real'(root) / 256));
    end
    fin();
  end
endmodule
