// tb_fft_mpath: checks the 1024-point multi-path FFT of chip 1 (8 paths of
// 128 points, default parameters) against a direct DFT computed here in
// floating point. Three random frames are streamed back to back; for the
// first two output frames the relative error energy of every frame must be
// below 1e-3 (the twiddles come from a shift-and-add approximation), the
// peak bin of a single tone must be exact, and the output frame must start
// a fixed number of cycles after its input frame.
module tb_fft_mpath;
  import wss_pkg::*;
  localparam int L = 8, LOG2M = 7, M = 1 << LOG2M, N = L * M, NF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [L*2*DW-1:0] din, dout;
  logic [LOG2M-1:0] out_q, out_seq;
  int checks = 0, failures = 0;

  fft_mpath #(.L(L), .LOG2M(LOG2M), .RECONF(1'b0)) dut (
    .clk, .rst_n, .clr(1'b0), .log2m(4'(LOG2M)), .in_valid, .din,
    .out_valid, .dout, .out_q, .out_seq);

  int xr [NF][N], xi [NF][N];
  real yr [N], yi [N];
  int  first_in_cycle, first_out_cycle, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic dft(input int f);
    real a;
    for (int k = 0; k < N; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * 3.14159265358979 * real'((n * k) % N) / N;
        yr[k] += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
        yi[k] += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
      end
    end
  endtask

  initial begin
    // frame 0: tone in bin 37 plus small noise; frames 1, 2: random
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin
          xr[f][n] = $rtoi(1500.0 * $cos(2.0 * 3.14159265358979 * 37 * n / N)) + int'($urandom_range(40)) - 20;
          xi[f][n] = $rtoi(1500.0 * $sin(2.0 * 3.14159265358979 * 37 * n / N)) + int'($urandom_range(40)) - 20;
        end else begin
          xr[f][n] = int'($urandom_range(4000)) - 2000;
          xi[f][n] = int'($urandom_range(4000)) - 2000;
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < M; c++) begin
        for (int l = 0; l < L; l++)
          din[l*2*DW +: 2*DW] = {DW'(xr[f][c*L+l]), DW'(xi[f][c*L+l])};
        in_valid = 1;
        if (f == 0 && c == 0) first_in_cycle = cyc;
        @(posedge clk);
      end
    in_valid = 0;
  end

  // collect and compare output frames
  initial begin
    real er, ei, se, ss, mx;
    int fo, k, pk;
    fo = 0;
    se = 0; ss = 0;
    wait (rst_n);
    while (fo < 2) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_seq == 0) begin
          if (fo == 0) first_out_cycle = cyc;
          dft(fo);
          se = 0; ss = 0; mx = 0; pk = -1;
        end
        for (int p = 0; p < L; p++) begin
          k  = int'(out_q) + M * p;
          er = real'($signed(dout[p*2*DW+DW +: DW])) - yr[k];
          ei = real'($signed(dout[p*2*DW +: DW])) - yi[k];
          se += er * er + ei * ei;
          ss += yr[k] * yr[k] + yi[k] * yi[k];
          if (fo == 0) begin
            er = real'($signed(dout[p*2*DW+DW +: DW]));
            ei = real'($signed(dout[p*2*DW +: DW]));
            if (er * er + ei * ei > mx) begin mx = er * er + ei * ei; pk = k; end
          end
        end
        if (out_seq == M - 1) begin
          checks++;
          $display("frame %0d: error energy ratio %e", fo, se / ss);
          if (se / ss > 1e-3) failures++;
          if (fo == 0) begin
            checks++;
            if (pk != 37) begin failures++; $display("peak at %0d", pk); end
          end
          fo++;
        end
      end
    end
    checks++;
    $display("latency %0d cycles", first_out_cycle - first_in_cycle);
    if (first_out_cycle - first_in_cycle > 2 * M) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * M + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
