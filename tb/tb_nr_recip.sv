// tb_nr_recip: checks the Newton-Raphson reciprocal. Cold starts on random mantissas must give 1/m to 2^-10 in ITER+1 cycles after start; a warm start on a nearby mantissa with the same normalising shift must take the short ITER_WARM path and still reach 2^-8; a warm request with a different shift must fall back to a cold start.
module tb_nr_recip;
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
  logic [MW-1:0] m; logic [17:0] y; logic [3:0] sh;
  nr_recip #(.ITER(4), .ITER_WARM(1)) dut (.clk, .rst_n, .start, .warm, .m, .busy, .done, .y, .sh, .warm_used);
  task automatic run(input int mv, input bit w, output int cyc);
    @(negedge clk); m = MW'(mv); warm = w; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask
  initial begin
    int cyc, mv; real err;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      mv = 1 + $urandom_range(510);
      run(mv, 0, cyc);
      err = rabs(real'(y) * real'(mv) * $pow(2.0, real'(sh)) / 16777216.0 - 1.0);
      chk(err < 1.0 / 1024, $sformatf("cold m=%0d y=%0d sh=%0d err=%f", mv, y, sh, err));
      chk(cyc == 6 && !warm_used, $sformatf("cold latency %0d", cyc));
      // nearby value, same octave: warm start
      mv = mv + ((mv > 400) ? -int'($urandom_range(mv / 100)) : int'($urandom_range(mv / 100)));
      run(mv, 1, cyc);
      err = rabs(real'(y) * real'(mv) * $pow(2.0, real'(sh)) / 16777216.0 - 1.0);
      if (warm_used) begin
        chk(err < 1.0 / 256, $sformatf("warm m=%0d err=%f", mv, err));
        chk(cyc == 3, $sformatf("warm latency %0d", cyc));
      end else
        chk(err < 1.0 / 1024 && cyc == 6, "fallback cold start");
    end
    // different octave with warm request: must fall back
    run(300, 0, cyc); run(100, 1, cyc);
    chk(!warm_used && cyc == 6, "warm start across octaves not refused");
    fin();
  end
endmodule
