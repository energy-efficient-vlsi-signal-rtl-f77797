// nco_mixer: digital down-conversion for fine sensing. Multiplies L parallel
// complex samples by exp(-j*2*pi*phi/2^PW), where phi advances by `inc` per
// sample, moving the band of interest to DC before the CIC filter.
//
// How it works: a PW-bit phase accumulator advances by L*inc per clock; lane
// l uses phase acc + l*inc. cos/sin come from the shift-and-add twiddle
// generator (no ROM). Each lane does a full complex multiply
// (x_r + j x_i)(c - j s); the product is rounded back to OW bits and
// saturated.
//
// Interface/timing: in_valid/din ({re, im} per lane, IW bits), registered
// output (latency 1). clr resets the phase to 0 (start of a fine-sensing run).
// inc is a signed phase step in units of 2^-PW cycles per sample; with PW = 13
// a 64-point coarse bin is 128 units, so the controller passes 64 per
// half coarse bin of centre offset.
//
// Follows the text: the mixer ahead of the CIC filter, one multiplier per
// sample at F_s, 16-way parallel at 500 MS/s. Own choices: PW = 13, the
// shift-and-add sine generator, the widths and saturation.
module nco_mixer #(
  parameter int L  = 16,
  parameter int IW = 10,
  parameter int OW = 10,
  parameter int PW = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic signed [PW-1:0]  inc,
  input  logic                  in_valid,
  input  logic [L*2*IW-1:0]     din,
  output logic                  out_valid,
  output logic [L*2*OW-1:0]     dout
);
  localparam int TW = 12;
  logic [PW-1:0] acc;
  logic [PW-1:0] ph [L];
  logic signed [TW-1:0] c [L];
  logic signed [TW-1:0] s [L];

  for (genvar l = 0; l < L; l++) begin : g_lane
    assign ph[l] = acc + PW'(l) * PW'(inc);
    twiddle_gen #(.PW(PW), .TW(TW)) u_tw (.phase(ph[l]), .cos_o(c[l]), .sin_o(s[l]));
  end

  function automatic logic signed [OW-1:0] sat(input logic signed [IW+TW:0] v);
    logic signed [IW+TW:0] r;
    r = (v + (IW+TW+1)'(1 << (TW-3))) >>> (TW-2);
    if (r > (IW+TW+1)'((1 << (OW-1)) - 1))       return OW'((1 << (OW-1)) - 1);
    else if (r < -(IW+TW+1)'(1 << (OW-1)))       return OW'(-(1 << (OW-1)));
    else                                          return OW'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; out_valid <= 1'b0; dout <= '0;
    end else if (clr) begin
      acc <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc <= acc + PW'(L) * PW'(inc);
        for (int l = 0; l < L; l++) begin
          logic signed [IW-1:0] xr, xi;
          logic signed [IW+TW:0] yr, yi;
          xr = din[l*2*IW+IW +: IW];
          xi = din[l*2*IW +: IW];
          yr = (IW+TW+1)'(xr * c[l]) + (IW+TW+1)'(xi * s[l]);
          yi = (IW+TW+1)'(xi * c[l]) - (IW+TW+1)'(xr * s[l]);
          dout[l*2*OW+OW +: OW] <= sat(yr);
          dout[l*2*OW +: OW]    <= sat(yi);
        end
      end
    end
  end
endmodule
