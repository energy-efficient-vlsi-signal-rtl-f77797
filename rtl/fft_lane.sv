// fft_lane: pipelined single-path delay-feedback (SDF) FFT of one path.
//
// LOG2N radix-2 DIF SDF stages are cascaded, stage s having a feedback delay
// of 2^(LOG2N-1-s). Stages are grouped into radix-2^k processing units by
// GROUP_END (bit s set: stage s ends a unit). Between the stages of one unit
// the twiddle factors are powers of W8 (a trivial -j, or the 0.7071 constant)
// and use the constant multiplier rot_const. After the last stage of a unit
// a full multiplier (cmul3) applies the generated twiddle (twiddle_gen). The
// twiddle exponents follow from the index bits of the decimation-in-frequency
// decomposition: after stage r the stream position t holds the output bits
// k_0..k_r in its top bits and the not yet consumed input bits below them.
//   within a unit:  W_N^( n_(S-2-r) 2^(S-2-r) * sum_{j=g0..r} k_j 2^j )
//   end of a unit:  W_N^( (sum_{j=g0..r} k_j 2^j) * (n mod 2^(S-1-r)) )
// Units may be radix-2, 2^2 or 2^3 (so that inner constants are W8 powers).
//
// Run-time size: log2n (<= LOG2N) selects a 2^log2n-point transform by
// bypassing the first LOG2N-log2n stages; the twiddle exponents are rescaled.
// With a reconfigurable size use GROUP_END all ones (radix-2 units), since
// the unit boundaries must not depend on the size.
//
// Interface: in_valid/din (natural order, packed {re,im}); out_valid/dout in
// bit-reversed order, out_seq = position in the output frame, out_idx = bin
// index of dout. clr restarts all frame counters. The radix grouping and
// the twiddle approach are the published ones; bit-reversed output with an
// index, and the run-time bypass, are this design's choices.
//
// Lint notes: e16/ph are only read in the constant-rotation or generated-twiddle
// branch, depending on the stage, so some instances leave them unused.
module fft_lane
  import wss_pkg::*;
#(
  parameter int             LOG2N     = 7,
  parameter logic [15:0]    GROUP_END = 16'b1001010
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [3:0]       log2n,
  input  logic             in_valid,
  input  logic [2*DW-1:0]  din,
  output logic             out_valid,
  output logic [2*DW-1:0]  dout,
  output logic [LOG2N-1:0] out_seq,
  output logic [LOG2N-1:0] out_idx
);
  // first stage of the unit that contains stage s
  function automatic int gstart(input int s);
    int g;
    g = s;
    while (g > 0 && !GROUP_END[g-1]) g--;
    return g;
  endfunction

  logic            sv [LOG2N+1];
  logic [2*DW-1:0] sd [LOG2N+1];
  logic [LOG2N-1:0] last_cnt;

  assign sv[0] = in_valid;
  assign sd[0] = din;

  for (genvar s = 0; s < LOG2N; s++) begin : g_st
    localparam int G0 = gstart(s);
    logic            act;
    logic            bv, tv;
    logic [2*DW-1:0] bd, td;
    logic [LOG2N-1:0] cnt;         // position in the frame at the stage output

    assign act = (s >= (LOG2N - int'(log2n)));

    sdf_stage #(.DW(DW), .D(1 << (LOG2N-1-s))) u_bf (
      .clk, .rst_n, .clr, .in_valid(sv[s] && act), .din(sd[s]),
      .out_valid(bv), .dout(bd));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                   cnt <= '0;
      else if (clr)                 cnt <= '0;
      else if (bv)                  cnt <= (cnt + 1'b1) & LOG2N'((1 << log2n) - 1);
    end

    if (s == LOG2N-1) begin : g_last
      assign tv = bv;
      assign td = bd;
      assign last_cnt = cnt;
    end else begin : g_tw
      logic signed [31:0] r, g0r, sl;
      logic [31:0] kfull, kk, nlow, e;
      logic [3:0]       e16;
      logic [LOG2N-1:0] ph;
      always_comb begin
        sl    = int'(log2n);
        r     = s - (LOG2N - sl);
        g0r   = G0 - (LOG2N - sl);
        kfull = bitrev(int'(cnt) >> (sl - 1 - r), r + 1);
        kk    = kfull & ~((32'd1 << g0r) - 1);
        nlow  = int'(cnt) & ((32'd1 << (sl - 1 - r)) - 1);
        e     = (kk * nlow) & ((32'd1 << sl) - 1);
        ph    = LOG2N'(e << (LOG2N - sl));
        e16   = (sl - 2 - r >= 0 && cnt[(sl - 2 - r) & 15]) ? 4'((kk << 2) >> r) : 4'd0;
      end
      if (GROUP_END[s]) begin : g_full
        logic signed [TW-1:0] wc, ws;
        twiddle_gen #(.PW(LOG2N), .TW(TW)) u_tw (.phase(ph), .cos_o(wc), .sin_o(ws));
        cmul3 #(.DW(DW), .TW(TW)) u_mul (
          .clk, .rst_n, .in_valid(bv), .a(bd), .w({wc, -ws}), .out_valid(tv), .p(td));
      end else begin : g_const
        logic [2*DW-1:0] rd;
        rot_const u_rot (.a(bd), .e(e16), .p(rd));
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            tv <= 1'b0;
            td <= '0;
          end else begin
            tv <= bv;
            if (bv) td <= rd;
          end
        end
      end
    end

    assign sv[s+1] = act ? tv : sv[s];
    assign sd[s+1] = act ? td : sd[s];
  end

  assign out_valid = sv[LOG2N];
  assign dout      = sd[LOG2N];
  assign out_seq   = last_cnt;
  assign out_idx   = LOG2N'(bitrev(int'(last_cnt), int'(log2n)));
endmodule
