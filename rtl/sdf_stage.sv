// sdf_stage: radix-2 decimation-in-frequency single-path delay-feedback stage.
//
// A counter of valid inputs runs over 2D samples. For the first D inputs of
// each block the stage is in data-switch mode: the input is written into the
// feedback delay line and the word leaving the line (the difference left
// from the previous block) is output. For the next D inputs it is in
// butterfly mode: with a = delayed sample and b = input it outputs a + b and
// writes a - b back into the line. The stage starts emitting once the line
// has been filled for the first time.
//
// Interface: in_valid/din, out_valid/dout (packed {re, im}, DW bits each).
// Output is registered, so dout follows the input that produced it by one
// valid input plus one clock. clr restarts the block counter (used when the
// FFT size is changed). No scaling: the word must hold the growth.
// Delay lines of 256 or longer are register files, shorter ones flip-flops
// (the text uses register files for its 512 and 1024 delay lines; the
// longest lines of this design's 128- and 512-point paths are 64 and 256).
module sdf_stage #(
  parameter int DW = 24,
  parameter int D  = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            in_valid,
  input  logic [2*DW-1:0] din,
  output logic            out_valid,
  output logic [2*DW-1:0] dout
);
  localparam int CW = $clog2(2*D);
  logic [CW-1:0]   cnt;
  logic            primed;
  logic            bfly;
  logic [2*DW-1:0] dl_out, dl_in, res;
  logic signed [DW-1:0] ar, ai, br, bi;

  assign bfly = cnt[CW-1];
  assign ar = $signed(dl_out[2*DW-1:DW]);
  assign ai = $signed(dl_out[DW-1:0]);
  assign br = $signed(din[2*DW-1:DW]);
  assign bi = $signed(din[DW-1:0]);

  always_comb begin
    if (bfly) begin
      res   = {ar + br, ai + bi};
      dl_in = {ar - br, ai - bi};
    end else begin
      res   = dl_out;
      dl_in = din;
    end
  end

  if (D >= 256) begin : g_rf
    delay_rf #(.W(2*DW), .D(D)) u_dl (.clk, .rst_n, .en(in_valid), .din(dl_in), .dout(dl_out));
  end else begin : g_dff
    delay_dff #(.W(2*DW), .D(D)) u_dl (.clk, .rst_n, .en(in_valid), .din(dl_in), .dout(dl_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else if (clr) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (primed || bfly);
      if (in_valid) begin
        cnt  <= cnt + 1'b1;
        dout <= res;
        if (bfly) primed <= 1'b1;
      end
    end
  end
endmodule
