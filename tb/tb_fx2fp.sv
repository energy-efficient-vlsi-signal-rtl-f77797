// tb_fx2fp: checks the fixed- to floating-point converter on random inputs of every magnitude: the result must be normalised and within one mantissa step of the input, and small inputs exact.
module tb_fx2fp;
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
  logic [39:0] din; fp_t dout;
  fx2fp #(.IN_W(40), .FRAC(0)) dut (.din, .dout);
  initial begin
    real v, g;
    for (int i = 0; i < 2000; i++) begin
      din = 40'({$urandom, $urandom}) >> $urandom_range(39);
      #1;
      v = real'(din); g = fpv(dout);
      if (din >= 256) begin
        chk(dout.m >= 256 && dout.m <= 511, $sformatf("not normalised %0d", din));
        chk(g <= v && v - g < v / 256.0, $sformatf("value %0d -> %f", din, g));
      end else chk(g == v, $sformatf("small %0d -> %f", din, g));
    end
    fin();
  end
  initial begin #100000; failures++; fin(); end
endmodule
