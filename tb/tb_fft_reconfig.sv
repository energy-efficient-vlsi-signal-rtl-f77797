// tb_fft_reconfig: checks the reconfigurable FFT of chip 2 (16 paths of
// 4..512 points, default parameters) at 64, 512 and 8192 points against a
// direct DFT computed here. For each size the FFT is cleared, two random
// frames are streamed and the first output frame must match with a relative
// error energy below 1e-3; its peak bin (a tone is added) must be exact.
module tb_fft_reconfig;
  import wss_pkg::*;
  localparam int L = 16, LOG2M = 9, NMAX = L << LOG2M;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, clr = 0;
  logic [3:0] log2m = 4'd2;
  logic [L*2*DW-1:0] din, dout;
  logic [LOG2M-1:0] out_q, out_seq;
  int checks = 0, failures = 0;

  fft_mpath #(.L(L), .LOG2M(LOG2M), .RECONF(1'b1)) dut (
    .clk, .rst_n, .clr, .log2m, .in_valid, .din, .out_valid, .dout, .out_q, .out_seq);

  int xr [NMAX], xi [NMAX];
  real yr [NMAX], yi [NMAX];

  task automatic dft(input int n_pts);
    real a;
    for (int k = 0; k < n_pts; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < n_pts; n++) begin
        a = -2.0 * 3.14159265358979 * real'((longint'(n) * k) % n_pts) / n_pts;
        yr[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        yi[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
    end
  endtask

  task automatic run_size(input int lm);
    int n_pts, m, tone, k, pk, got;
    real er, ei, se, ss, mx, pr, pi_;
    m     = 1 << lm;
    n_pts = L * m;
    tone  = n_pts / 3 + 1;
    for (int n = 0; n < n_pts; n++) begin
      xr[n] = $rtoi(400.0 * $cos(2.0 * 3.14159265358979 * tone * n / n_pts)) + int'($urandom_range(200)) - 100;
      xi[n] = $rtoi(400.0 * $sin(2.0 * 3.14159265358979 * tone * n / n_pts)) + int'($urandom_range(200)) - 100;
    end
    dft(n_pts);
    @(posedge clk);
    log2m <= 4'(lm);
    clr   <= 1;
    @(posedge clk);
    clr   <= 0;
    fork
      begin
        for (int f = 0; f < 2; f++)
          for (int c = 0; c < m; c++) begin
            for (int l = 0; l < L; l++)
              din[l*2*DW +: 2*DW] <= {DW'(xr[c*L+l]), DW'(xi[c*L+l])};
            in_valid <= 1;
            @(posedge clk);
          end
        in_valid <= 0;
      end
      begin
        se = 0; ss = 0; mx = 0; pk = -1; got = 0;
        while (got < m) begin
          @(posedge clk);
          if (out_valid && (got > 0 || out_seq == 0)) begin
            for (int p = 0; p < L; p++) begin
              k  = int'(out_q) + m * p;
              pr = real'($signed(dout[p*2*DW+DW +: DW]));
              pi_ = real'($signed(dout[p*2*DW +: DW]));
              er = pr - yr[k]; ei = pi_ - yi[k];
              se += er * er + ei * ei;
              ss += yr[k] * yr[k] + yi[k] * yi[k];
              if (pr * pr + pi_ * pi_ > mx) begin mx = pr * pr + pi_ * pi_; pk = k; end
            end
            got++;
          end
        end
      end
    join
    checks += 2;
    $display("size %0d: error energy ratio %e, peak %0d (tone %0d)", n_pts, se / ss, pk, tone);
    if (se / ss > 1e-3) failures++;
    if (pk != tone) failures++;
    repeat (3 * m) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_size(2);
    run_size(5);
    run_size(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
