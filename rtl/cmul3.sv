// cmul3: full complex multiplier with three real multipliers and five adders,
// used for the inter-stage (full) twiddle multiplications of the FFTs.
//   (a + jb)(c + jd):  k1 = c(a - b), k2 = d(a + b), k3 = b(c - d)
//                      re = k1 + k3 = ac - bd,  im = k2 + k3 = ad + bc
// The data word a is packed {re, im} with DW bits each; the twiddle w is
// packed {c, d} with TW bits each and TW-2 fraction bits. The product is
// rounded back to DW bits. One register stage: p and out_valid follow
// in_valid by one clock. The 3-multiplier form is the published one; the
// register and rounding are this design's choices.
//
// Lint notes: the top product bits are dropped by design (the result is rescaled
// by 2^-(TW-2) and fits DW bits for |w| <= 1).
module cmul3 #(
  parameter int DW = 24,
  parameter int TW = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2*DW-1:0]     a,
  input  logic [2*TW-1:0]     w,
  output logic                out_valid,
  output logic [2*DW-1:0]     p
);
  localparam int PWID = DW + TW + 2;
  logic signed [DW-1:0]   ar, ai;
  logic signed [TW-1:0]   wc, wd;
  logic signed [DW:0]     amb, apb;
  logic signed [TW:0]     cmd;
  logic signed [PWID-1:0] k1, k2, k3, re, im;

  always_comb begin
    ar  = $signed(a[2*DW-1:DW]);
    ai  = $signed(a[DW-1:0]);
    wc  = $signed(w[2*TW-1:TW]);
    wd  = $signed(w[TW-1:0]);
    amb = (DW+1)'(ar) - (DW+1)'(ai);
    apb = (DW+1)'(ar) + (DW+1)'(ai);
    cmd = (TW+1)'(wc) - (TW+1)'(wd);
    k1  = PWID'(amb) * PWID'(wc);
    k2  = PWID'(apb) * PWID'(wd);
    k3  = PWID'(ai)  * PWID'(cmd);
    re  = (k1 + k3 + (PWID'(1) <<< (TW-3))) >>> (TW-2);
    im  = (k2 + k3 + (PWID'(1) <<< (TW-3))) >>> (TW-2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= {re[DW-1:0], im[DW-1:0]};
    end
  end
endmodule
