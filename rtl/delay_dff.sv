// delay_dff: pointer-based flip-flop delay buffer.
//
// Instead of shifting every word each cycle, a one-hot pointer circulates
// around a ring (the shift-delay-line). Only the cells it points at is
// written; its old contents (written D advances ago) are read through an
// AND gate per cells and an OR tree. The idle cells hold their value, which in
// silicon lets them be clock-gated; here that is an enable per cells.
//
// Interface: when en is high, din is written and the pointer advances;
// dout is the word written D enabled cycles earlier (combinational from
// state). Cell contents are not reset: they are overwritten before they are
// read in every use in this design. Used for delay lines shorter than 512.
module delay_dff #(
  parameter int W = 48,
  parameter int D = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [D-1:0] ptr;                 // one-hot shift-delay-line
  logic [W-1:0] cells [D];

  logic [D-1:0] ptr_nxt;
  if (D == 1) begin : g_one
    assign ptr_nxt = ptr;
  end else begin : g_ring
    assign ptr_nxt = {ptr[D-2:0], ptr[D-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= D'(1);
    else if (en) ptr <= ptr_nxt;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < D; i++)
      if (en && ptr[i]) cells[i] <= din;
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < D; i++) dout |= cells[i] & {W{ptr[i]}};
  end
endmodule
