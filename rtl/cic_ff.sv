// cic_ff: programmable 4th-order CIC decimator, R = 2^log2r, R = 1..1024,
// built from ten feed-forward half-band stages (cic_ff_stage). Stage i sees
// max(L >> i, 1) lanes; stages beyond log2r are disabled and hold their
// registers (the chip gates their clocks), and the output is taken after
// stage log2r - 1. With log2r = 0 the input passes through, scaled like a
// stage output.
//
// Interface/timing: din carries L complex {re, im} IW-bit samples per clock.
// dout carries out_lanes = max(L >> log2r, 1) valid lanes of OW bits in lanes
// 0..out_lanes-1 (time order), registered; each stage adds one clock of
// latency. stage_en shows the enabled stages. clr empties all histories.
//
// Follows the text: feed-forward CIC of order S = 4 for power-of-two ratios up
// to 1024 (Fig. 6.12), parallel input, clock gating of unused stages.
// Own choices: per-stage rescaling to OW = 14 bits (gain 16 kept once, from the
// first stage), registered stage outputs.
module cic_ff #(
  parameter int L      = 16,
  parameter int IW     = 10,
  parameter int OW     = 14,
  parameter int NSTAGE = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic [3:0]            log2r,
  input  logic                  in_valid,
  input  logic [L*2*IW-1:0]     din,
  output logic                  out_valid,
  output logic [L*2*OW-1:0]     dout,
  output logic [4:0]            out_lanes,
  output logic [NSTAGE-1:0]     stage_en
);
  logic [L*2*OW-1:0] sd [NSTAGE+1];   // stage outputs, zero-padded to L lanes
  logic              sv [NSTAGE+1];

  // stage "-1": input rescaled to OW bits (gain 16)
  always_comb begin
    sd[0] = '0;
    for (int l = 0; l < L; l++) begin
      sd[0][l*2*OW+OW +: OW] = OW'($signed(din[l*2*IW+IW +: IW])) <<< (OW - IW);
      sd[0][l*2*OW +: OW]    = OW'($signed(din[l*2*IW +: IW])) <<< (OW - IW);
    end
    sv[0] = in_valid;
  end

  for (genvar i = 0; i < NSTAGE; i++) begin : g_st
    localparam int LI  = (L >> i) > 1 ? (L >> i) : 1;
    localparam int LO  = (LI > 1) ? LI / 2 : 1;
    localparam int SIW = (i == 0) ? IW : OW;
    logic [LI*2*SIW-1:0] si;
    logic [LO*2*OW-1:0]  so;
    assign stage_en[i] = (i < int'(log2r));
    if (i == 0) begin : g_first
      assign si = din;
    end else begin : g_next
      assign si = sd[i][LI*2*OW-1:0];
    end
    cic_ff_stage #(.LI(LI), .IW(SIW), .OW(OW)) u_st (
      .clk, .rst_n, .clr, .en(stage_en[i]), .in_valid(sv[i] && stage_en[i]),
      .din(si), .out_valid(sv[i+1]), .dout(so));
    assign sd[i+1] = (L*2*OW)'(so);
  end

  always_comb begin
    out_valid = sv[log2r];
    dout      = sd[log2r];
    out_lanes = ((L >> log2r) > 1) ? 5'(L >> log2r) : 5'd1;
  end
endmodule
