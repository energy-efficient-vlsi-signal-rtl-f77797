// twiddle_gen: cos/sin of 2*pi*phase/2^PW without a ROM.
//
// The angle is folded into the first octant [0, pi/4) using the symmetry of
// sine and cosine (the top three phase bits select the octant, odd octants
// are mirrored). Inside the octant the sine is a two-piece linear function of
// the normalised angle a (angle = 2*pi*a, 0 <= a <= 1/8):
//     sin ~ 25/4 a              for a < 1/16
//     sin ~ 41/8 a + 9/128      otherwise
// and the cosine is a four-piece linear function of that sine:
//     1 - s/16, 65/64 - 3s/16, 17/16 - 3s/8, 5/4 - 3s/4
// switching at s = 1/8, 1/4, 1/2. Only shifts and adds are needed. The
// approximation error is about 1-2 % of full scale; this is the accuracy the
// design accepts for its twiddle factors.
//
// Interface: combinational. phase is PW bits; cos_o and sin_o are TW-bit
// two's complement with TW-2 fraction bits (1.0 = 2^(TW-2)).
// The segment coefficients are the published ones; the octant folding,
// 16-bit internal precision and the output format are this design's choices.
module twiddle_gen #(
  parameter int PW = 13,
  parameter int TW = 12
) (
  input  logic [PW-1:0]        phase,
  output logic signed [TW-1:0] cos_o,
  output logic signed [TW-1:0] sin_o
);
  localparam int FB = 18;                 // internal fraction bits
  localparam int OF = TW - 2;             // output fraction bits
  localparam logic [FB+2:0] ONE = 21'(1) << FB;

  logic [2:0]    oct;
  logic [PW-4:0] beta;
  logic [PW-3:0] q;            // 0 .. 2^(PW-3), angle a = q / 2^PW
  logic [FB+2:0] a, s, c;      // unsigned fixed point, FB fraction bits
  logic signed [TW-1:0] so, co;

  always_comb begin
    oct  = phase[PW-1:PW-3];
    beta = phase[PW-4:0];
    q    = oct[0] ? ((PW-2)'(1) << (PW-3)) - (PW-2)'(beta) : (PW-2)'(beta);
    a    = (FB+3)'(q) << (FB - PW);
    // sine, Eq. for 0 <= a <= 1/8
    if (a < (ONE >> 4)) s = (a * 25) >> 2;
    else                s = ((a * 41) >> 3) + ((ONE * 9) >> 7);
    // cosine as a function of the sine
    if      (s < (ONE >> 3)) c = ONE - (s >> 4);
    else if (s < (ONE >> 2)) c = ((ONE * 65) >> 6) - ((s * 3) >> 4);
    else if (s < (ONE >> 1)) c = ((ONE * 17) >> 4) - ((s * 3) >> 3);
    else                     c = ((ONE * 5) >> 2) - ((s * 3) >> 2);
    so = TW'((s + (ONE >> (OF + 1))) >> (FB - OF));
    co = TW'((c + (ONE >> (OF + 1))) >> (FB - OF));
    unique case (oct)
      3'd0: begin cos_o =  co; sin_o =  so; end
      3'd1: begin cos_o =  so; sin_o =  co; end
      3'd2: begin cos_o = -so; sin_o =  co; end
      3'd3: begin cos_o = -co; sin_o =  so; end
      3'd4: begin cos_o = -co; sin_o = -so; end
      3'd5: begin cos_o = -so; sin_o = -co; end
      3'd6: begin cos_o =  so; sin_o = -co; end
      default: begin cos_o = co; sin_o = -so; end
    endcase
  end
endmodule
