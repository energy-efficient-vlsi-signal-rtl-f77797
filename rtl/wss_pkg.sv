// wss_pkg: types, constants and shared arithmetic for the wideband
// spectrum-sensing processor (chip 1) and the band-segmentation processor
// (chip 2).
//
// Floating-point format (chip 1 power path): a 10-bit two's-complement
// mantissa and a 5-bit two's-complement exponent, as chosen in the design
// (10-bit mantissa / 5-bit exponent). The value of {m,e} is m * 2^(e+FP_BIAS).
// The bias is this design's own choice: it places the squared FFT outputs in
// the lower half of the exponent range so that sums of up to 2^15 frames
// still fit. A normalised non-zero value has 256 <= |m| <= 511; values too
// small for e = -16 are kept unnormalised (gradual underflow), values too
// large saturate.
//
// rot16() is the constant (CSD shift-and-add) multiplier by W16^e used inside
// the radix-2^k processing units and the parallel FFT. Its digits:
//   0.7071 = 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8
//   0.9238 = 2^0 - 2^-3 + 2^-5 + 2^-6 + 2^-9
//   0.3827 = 2^-2 + 2^-3 + 2^-7
//
// Lint notes: FP_ZERO and TW are used by some modules only, and rot16 keeps the
// top bits of its 36-bit products unused on purpose (the result is rescaled).
package wss_pkg;

  // ---------------- floating point ----------------
  localparam int MW      = 10;   // mantissa bits
  localparam int EW      = 5;    // exponent bits
  localparam int FP_BIAS = 16;
  localparam int EMIN    = -16;
  localparam int EMAX    = 15;

  typedef struct packed {
    logic signed [MW-1:0] m;
    logic signed [EW-1:0] e;
  } fp_t;

  localparam fp_t FP_ZERO = '{m: '0, e: EW'(EMIN)};

  // Normalise a wide two's-complement mantissa v with exponent e:
  // priority-encode the leading significant bit and barrel-shift so that
  // 256 <= |m| <= 511, then clamp the exponent to [EMIN, EMAX].
  function automatic fp_t fp_norm(input logic signed [47:0] v, input int e);
    logic signed [47:0] x;
    int ex;
    int msb;
    logic [47:0] mag;
    fp_t r;
    x   = v;
    ex  = e;
    mag = x[47] ? 48'(~x) : 48'(x);   // one's complement keeps -2^k exact
    msb = -1;
    for (int i = 0; i < 47; i++) if (mag[i]) msb = i;
    if (msb < 0) begin
      r.m = x[47] ? -MW'(1) : '0;
      r.e = x[47] ? EW'(ex) : EW'(EMIN);
      if (x[47] && (ex < EMIN || ex > EMAX)) r.e = EW'(EMIN);
      return r;
    end
    if (msb > MW-2) begin
      x  = x >>> (msb - (MW-2));
      ex = ex + (msb - (MW-2));
    end else begin
      x  = x <<< ((MW-2) - msb);
      ex = ex - ((MW-2) - msb);
    end
    if (ex < EMIN) begin
      x  = (EMIN - ex > 40) ? (x[47] ? -48'sd1 : 48'sd0) : (x >>> (EMIN - ex));
      ex = EMIN;
    end
    if (ex > EMAX) begin
      x  = x[47] ? -48'sd512 : 48'sd511;
      ex = EMAX;
    end
    r.m = x[MW-1:0];
    r.e = EW'(ex);
    return r;
  endfunction

  // Floating-point value of an unsigned 64-bit sum scaled by 2^-sh
  // (sum >> sh, saturating at the largest representable value).
  function automatic fp_t fp_from_sum(input logic [63:0] v, input int sh);
    logic [63:0] x;
    x = v >> sh;
    if (x[63:46] != '0) x = 64'((48'd511) << 37);
    return fp_norm(48'(x), -FP_BIAS);
  endfunction

  function automatic fp_t fp_neg(input fp_t a);
    fp_t r;
    r.m = -a.m;
    r.e = a.e;
    return r;
  endfunction

  // ---------------- complex data ----------------
  // A complex word is packed {re, im}, each DW bits two's complement.
  localparam int DW = 24;     // FFT datapath word (real and imaginary part)
  localparam int TW = 12;     // twiddle word, Q1.(TW-2): 1.0 = 2^(TW-2)

  // Constant multiply helpers: x * constant, with 10 guard bits, rounded.
  function automatic logic signed [DW+11:0] k7071(input logic signed [DW+11:0] x);
    return (x >>> 1) + (x >>> 3) + (x >>> 4) + (x >>> 6) + (x >>> 8);
  endfunction
  function automatic logic signed [DW+11:0] k9238(input logic signed [DW+11:0] x);
    return x - (x >>> 3) + (x >>> 5) + (x >>> 6) + (x >>> 9);
  endfunction
  function automatic logic signed [DW+11:0] k3827(input logic signed [DW+11:0] x);
    return (x >>> 2) + (x >>> 3) + (x >>> 7);
  endfunction

  function automatic logic signed [DW-1:0] rnd10(input logic signed [DW+11:0] x);
    logic signed [DW+11:0] t;
    t = (x + (DW+12)'(512)) >>> 10;
    return t[DW-1:0];
  endfunction

  // Multiply a complex word by W16^e = exp(-j*2*pi*e/16).
  function automatic logic [2*DW-1:0] rot16(input logic [2*DW-1:0] a, input logic [3:0] e);
    logic signed [DW+11:0] ar, ai, br, bi;
    logic signed [DW-1:0]  cr, ci;
    ar = (DW+12)'($signed(a[2*DW-1:DW])) <<< 10;
    ai = (DW+12)'($signed(a[DW-1:0]))    <<< 10;
    // residual rotation by W16^(e mod 4): (ar + j ai)(C - j S)
    unique case (e[1:0])
      2'd0: begin br = ar;                       bi = ai;                       end
      2'd1: begin br = k9238(ar) + k3827(ai);    bi = k9238(ai) - k3827(ar);    end
      2'd2: begin br = k7071(ar + ai);           bi = k7071(ai - ar);           end
      default: begin br = k3827(ar) + k9238(ai); bi = k3827(ai) - k9238(ar);    end
    endcase
    cr = rnd10(br);
    ci = rnd10(bi);
    // quadrant rotation by (-j)^(e div 4)
    unique case (e[3:2])
      2'd0: return {cr, ci};
      2'd1: return {ci, -cr};
      2'd2: return {-cr, -ci};
      default: return {-ci, cr};
    endcase
  endfunction

  function automatic int unsigned bitrev(input int unsigned v, input int n);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 16; i++) if (i < n && v[i]) r |= (1 << (n - 1 - i));
    return r;
  endfunction

endpackage
