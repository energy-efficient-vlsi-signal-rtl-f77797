// fft_par: L-point fully parallel FFT that combines the L paths of the
// multi-path FFT. A radix-2 decimation-in-frequency network of log2(L)
// butterfly columns; the twiddles inside it are powers of W_L (L <= 16) and
// use the constant (shift-and-add) multipliers of rot16(). The network's
// bit-reversed result is re-wired into natural order.
//
// Interface: din holds L complex words (lane i = input i), dout holds the L
// transform outputs (lane p = X[p]). One register stage (latency 1 clock,
// qualified by in_valid/out_valid). No scaling.
//
// Lint notes: the loop index is wider than the lane index it selects.
module fft_par
  import wss_pkg::*;
#(
  parameter int L = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [L*2*DW-1:0]   din,
  output logic                out_valid,
  output logic [L*2*DW-1:0]   dout
);
  localparam int LL = $clog2(L);
  logic [2*DW-1:0] v [LL+1][L];
  logic [L*2*DW-1:0] res;

  always_comb begin
    logic signed [DW-1:0] ar, ai, br, bi;
    int h, i, j;
    for (int k = 0; k < L; k++) v[0][k] = din[k*2*DW +: 2*DW];
    for (int st = 0; st < LL; st++) begin
      h = L >> (st + 1);
      for (int k = 0; k < L; k++) v[st+1][k] = v[st][k];
      for (int k = 0; k < L / 2; k++) begin
        i  = (k / h) * 2 * h + (k % h);
        j  = i + h;
        ar = $signed(v[st][i][2*DW-1:DW]);  ai = $signed(v[st][i][DW-1:0]);
        br = $signed(v[st][j][2*DW-1:DW]);  bi = $signed(v[st][j][DW-1:0]);
        v[st+1][i] = {ar + br, ai + bi};
        v[st+1][j] = rot16({ar - br, ai - bi}, 4'(((k % h) * (L / (2 * h)) * 16) / L));
      end
    end
    for (int k = 0; k < L; k++)
      res[bitrev(k, LL)*2*DW +: 2*DW] = v[LL][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= res;
    end
  end
endmodule
