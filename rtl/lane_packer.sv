// lane_packer: gearbox between the CIC decimator and the L-wide FFT input.
// After decimation by R only max(L/R, 1) new samples arrive per valid clock;
// the packer collects them in time order until L samples are available and
// then presents one full L-lane vector (lane l = sample L*t + l).
//
// How it works: a fill counter and an L-sample buffer; incoming samples are
// written at the fill position (nin is a power of two dividing L, so a vector
// never straddles two output vectors). When the buffer completes, the full
// vector is registered to the output together with out_valid.
//
// Interface/timing: nin = number of valid lanes in din (1, 2, 4, ..., L);
// output registered, latency 1 clock after the completing input. clr empties
// the buffer. W is the width of one complex sample.
//
// Own design block: the text names the synchronisation of the CIC filter and
// the FFT processor but does not describe this gearbox.
module lane_packer #(
  parameter int L = 16,
  parameter int W = 28
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [4:0]       nin,
  input  logic             in_valid,
  input  logic [L*W-1:0]   din,
  output logic             out_valid,
  output logic [L*W-1:0]   dout
);
  localparam int CW = $clog2(L) + 1;
  logic [L*W-1:0] buf_q, buf_n;
  logic [CW-1:0]  fill, fill_n;

  always_comb begin
    buf_n  = buf_q;
    fill_n = fill + CW'(nin);
    for (int l = 0; l < L; l++)
      if (l < int'(nin)) buf_n[(int'(fill) + l) % L * W +: W] = din[l*W +: W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; fill <= '0; out_valid <= 1'b0; dout <= '0;
    end else if (clr) begin
      fill <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        buf_q <= buf_n;
        if (fill_n >= CW'(L)) begin
          fill <= '0; out_valid <= 1'b1; dout <= buf_n;
        end else fill <= fill_n;
      end
    end
  end
endmodule
