// delay_rf: register-file based delay buffer for long delay lines (512 and
// more). A memory of D words is addressed by a wrapping counter; each
// enabled cycle reads the word at the counter address (written D enabled
// cycles before) and overwrites it with din. In silicon this is a dual-port
// register file; here it is an array (read-before-write).
//
// Interface: as delay_dff. dout is combinational from the memory and the
// counter. The memory is not reset.
module delay_rf #(
  parameter int W = 48,
  parameter int D = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int AW = (D > 1) ? $clog2(D) : 1;
  logic [AW-1:0] addr;
  logic [W-1:0]  mem [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else if (en) addr <= (addr == AW'(D-1)) ? '0 : addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= din;
  end

  assign dout = mem[addr];
endmodule
