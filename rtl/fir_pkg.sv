// fir_pkg: types, constants and elaboration-time functions shared by the
// channel filter.
//
// Two things live here.
//
// 1. The binary common subexpression (BCS) vocabulary. A coefficient is kept
//    in plain binary (not CSD). Every run of set bits is covered, from the
//    most significant end, by one of the patterns [1], [11], [101], [111] or
//    [1001]. Each pattern is an odd multiple of the input (1x, 3x, 5x, 7x,
//    9x) shifted left, so the odd multiples are computed once per filter by
//    bcs_gen and shared by every tap. ([011] and [110] are both 3x, shifted.)
//
// 2. The coefficient-partitioning plan (bse_plan). The terms of one
//    coefficient are written in pseudo floating point: relative to the
//    position of the leading term. Their span M (leading-bit position of the
//    first term minus that of the last, plus one) is cut into an MSB half of
//    ceil(M/2) positions and an LSB half of floor(M/2). Each half is summed
//    on its own, normalised to its own lowest shift, so its adders are
//    narrow; one final adder joins the halves. This follows the published
//    procedure; which half gets the extra position for odd M, and measuring
//    M over leading-bit positions, are this design's reading of it (it
//    reproduces the method's worked example, where 0x0A55 splits into one
//    MSB term and two LSB terms).
//
// The integer convention: a COEF_W-bit coefficient magnitude C stands for
// C / 2^COEF_W. The hardware forms the exact integer product C * x; every
// shift is a left shift and no bit is dropped.
//
// lowpass_coef() designs the coefficients (step 1 of the procedure): a
// Kaiser-windowed ideal lowpass, quantised by rounding to COEF_W fractional
// bits, sign kept apart from the magnitude. The design method is this
// design's choice; the method only says the filter is designed to its
// specification.
package fir_pkg;

  // Largest coefficient word length the plan supports.
  localparam int unsigned MAX_COEF_W = 32;
  // At most one term per three bits, plus one: 12 terms cover 32 bits.
  localparam int unsigned MAX_TERMS  = 12;

  // Which shared odd multiple of the input a term uses.
  typedef enum logic [2:0] {
    BCS_X1 = 3'd0,   // [1]
    BCS_X3 = 3'd1,   // [11], also [011] and [110]
    BCS_X5 = 3'd2,   // [101]
    BCS_X7 = 3'd3,   // [111]
    BCS_X9 = 3'd4    // [1001]
  } bcs_sel_e;

  localparam int unsigned NUM_BCS = 5;

  // Odd multiple each selector stands for.
  function automatic int unsigned bcs_mult(bcs_sel_e s);
    case (s)
      BCS_X1:  return 1;
      BCS_X3:  return 3;
      BCS_X5:  return 5;
      BCS_X7:  return 7;
      default: return 9;
    endcase
  endfunction

  // One term: selector, left shift of its lsb, position of its leading bit,
  // and whether it belongs to the MSB sub-coefficient.
  typedef struct packed {
    bcs_sel_e    sel;
    logic [5:0]  lsb;
    logic [5:0]  msb;
    logic        hi;
  } bse_term_t;

  typedef struct packed {
    bse_term_t [MAX_TERMS-1:0] term;   // term[0] is the most significant
    logic [4:0]  n_terms;
    logic [4:0]  n_hi;                 // terms 0..n_hi-1 form the MSB part
    logic [5:0]  hi_lsb;               // lowest lsb shift of the MSB part
    logic [5:0]  hi_msb;               // leading bit of the MSB part
    logic [5:0]  lo_lsb;               // lowest lsb shift of the LSB part
    logic [5:0]  lo_msb;               // leading bit of the LSB part
  } bse_plan_t;

  // Split a coefficient magnitude into BCS terms and partition them.
  function automatic bse_plan_t bse_plan(logic [MAX_COEF_W-1:0] mag, int unsigned coef_w);
    bse_plan_t  p;
    int         pos;
    int         n;
    int         m;
    int         hi_len;
    logic [MAX_COEF_W+3:0] b;
    p   = '0;
    b   = {4'b0000, mag};
    n   = 0;
    pos = int'(coef_w) - 1;
    while (pos >= 0) begin
      if (!b[pos]) begin
        pos = pos - 1;
      end else begin
        p.term[n].msb = 6'(pos);
        if (pos >= 2 && b[pos-1] && b[pos-2]) begin            // [111]
          p.term[n].sel = BCS_X7; p.term[n].lsb = 6'(pos - 2); pos = pos - 3;
        end else if (pos >= 2 && !b[pos-1] && b[pos-2]) begin  // [101]
          p.term[n].sel = BCS_X5; p.term[n].lsb = 6'(pos - 2); pos = pos - 3;
        end else if (pos >= 1 && b[pos-1]) begin               // [110] / [11]
          p.term[n].sel = BCS_X3; p.term[n].lsb = 6'(pos - 1); pos = pos - 3;
        end else if (pos >= 3 && !b[pos-1] && !b[pos-2] && b[pos-3]) begin // [1001]
          p.term[n].sel = BCS_X9; p.term[n].lsb = 6'(pos - 3); pos = pos - 4;
        end else begin                                         // [1]
          p.term[n].sel = BCS_X1; p.term[n].lsb = 6'(pos); pos = pos - 1;
        end
        n = n + 1;
      end
    end
    p.n_terms = 5'(n);
    if (n > 0) begin
      // Span in leading-bit positions; MSB part takes ceil(M/2) of them.
      m      = int'(p.term[0].msb) - int'(p.term[n-1].msb) + 1;
      hi_len = (m + 1) / 2;
      for (int i = 0; i < n; i++) begin
        p.term[i].hi = (int'(p.term[0].msb) - int'(p.term[i].msb)) < hi_len;
        if (p.term[i].hi) p.n_hi = p.n_hi + 5'd1;
      end
      p.hi_msb = p.term[0].msb;
      p.hi_lsb = p.term[p.n_hi-1].lsb;
      if (int'(p.n_hi) < n) begin
        p.lo_msb = p.term[p.n_hi].msb;
        p.lo_lsb = p.term[n-1].lsb;
      end
    end
    return p;
  endfunction

  // Zeroth-order modified Bessel function of the first kind (Kaiser window).
  function automatic real bessel_i0(real x);
    real sum, t;
    sum = 1.0;
    t   = 1.0;
    for (int k = 1; k < 40; k++) begin
      t   = t * (x / (2.0 * k)) * (x / (2.0 * k));
      sum = sum + t;
    end
    return sum;
  endfunction

  // Kaiser beta for a stopband attenuation in dB (Kaiser's formula).
  function automatic real kaiser_beta(real atten_db);
    if (atten_db > 50.0)       return 0.1102 * (atten_db - 8.7);
    else if (atten_db >= 21.0) return 0.5842 * $pow(atten_db - 21.0, 0.4)
                                      + 0.07886 * (atten_db - 21.0);
    else                       return 0.0;
  endfunction

  // Coefficient k of an n_taps lowpass filter, quantised to coef_w
  // fractional bits. The cutoff sits midway between the band edges.
  // Returns a signed integer; its magnitude is clamped to coef_w bits.
  function automatic longint lowpass_coef(int k, int n_taps, real fs_hz,
                                          real fpass_hz, real fstop_hz,
                                          real atten_db, int coef_w);
    real pi, fc, t, ideal, r, w, h, lim;
    longint q;
    pi  = 3.14159265358979323846;
    fc  = (fpass_hz + fstop_hz) / (2.0 * fs_hz);       // cycles per sample
    t   = real'(k) - real'(n_taps - 1) / 2.0;
    if (t == 0.0) ideal = 2.0 * fc;
    else          ideal = $sin(2.0 * pi * fc * t) / (pi * t);
    if (n_taps > 1) r = 2.0 * real'(k) / real'(n_taps - 1) - 1.0;
    else            r = 0.0;
    w   = bessel_i0(kaiser_beta(atten_db) * $sqrt(1.0 - r * r))
          / bessel_i0(kaiser_beta(atten_db));
    h   = ideal * w * $pow(2.0, real'(coef_w));
    lim = $pow(2.0, real'(coef_w)) - 1.0;
    if (h >  lim) h =  lim;
    if (h < -lim) h = -lim;
    q = longint'(h);   // real-to-integer casts round to nearest
    return q;
  endfunction

endpackage
