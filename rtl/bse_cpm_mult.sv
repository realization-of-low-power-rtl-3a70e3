// bse_cpm_mult: one constant coefficient multiplier built by binary
// subexpression elimination with coefficient partitioning (BSE-CPM).
//
// The coefficient is a parameter. At elaboration fir_pkg::bse_plan() scans
// its binary magnitude from the top and covers the set bits with the shared
// patterns [1], [11], [101], [111] and [1001]; each term is then an odd
// multiple of the input taken from bcs_gen, shifted left. The terms are split
// into an MSB and an LSB sub-coefficient by halving their span. Each half is
// summed by a chain of adders working relative to that half's own lowest
// shift, so each adder is only as wide as the half it covers rather than the
// whole coefficient; a final adder aligns and joins the two halves. Splitting
// coefficients this way, with binary (not CSD) subexpressions, is the
// published BSE-CPM method. The exact integer form (left shifts, nothing dropped),
// chaining the adders of a half in order of significance, and negating here
// for a negative coefficient are this design's choices.
//
// Interface: bcs[] are the shared odd multiples of the current sample (see
// bcs_gen); p = COEF * x, exact, as a DATA_W+COEF_W bit signed number, where
// COEF is a signed integer whose magnitude has COEF_W bits and stands for
// COEF / 2^COEF_W. Timing: purely combinational.
//
// A coefficient uses only the subexpressions its patterns need, so the linter
// reports the other bcs[] entries as unused; a zero coefficient (common at
// the far ends of a long response) uses none and produces a constant 0.
module bse_cpm_mult
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 16,
  // Default: the method's worked example 0.0000101001010101 (binary).
  parameter longint      COEF   = 64'sh0A55
) (
  input  logic signed [DATA_W+3:0]          bcs [NUM_BCS],
  output logic signed [DATA_W+COEF_W-1:0]   p
);

  localparam int unsigned     P_W  = DATA_W + COEF_W;
  localparam bit              NEG  = COEF < 0;
  localparam longint unsigned MAG  = longint'(NEG ? -COEF : COEF);
  localparam bse_plan_t       PLAN = bse_plan(MAX_COEF_W'(MAG), COEF_W);
  localparam int              NT   = int'(PLAN.n_terms);
  localparam int              NH   = int'(PLAN.n_hi);
  localparam int              NL   = NT - NH;
  // Adder widths of the two halves and of the joining adder.
  localparam int              HW   = int'(DATA_W) + int'(PLAN.hi_msb) - int'(PLAN.hi_lsb) + 1;
  localparam int              LW   = (NL > 0) ? int'(DATA_W) + int'(PLAN.lo_msb) - int'(PLAN.lo_lsb) + 1 : 1;
  localparam int              FW   = (NL > 0) ? int'(DATA_W) + int'(PLAN.hi_msb) - int'(PLAN.lo_lsb) + 1 : HW;
  localparam int              BASE = (NL > 0) ? int'(PLAN.lo_lsb) : int'(PLAN.hi_lsb);

  initial begin
    assert (COEF_W <= MAX_COEF_W) else $error("COEF_W above %0d", MAX_COEF_W);
    assert (MAG < (64'd1 << COEF_W)) else $error("COEF does not fit in COEF_W bits");
  end

  logic signed [P_W-1:0] mag_p;

  if (NT == 0) begin : g_zero
    assign mag_p = '0;
  end else begin : g_terms
    logic signed [HW-1:0] hacc [NH];
    logic signed [FW-1:0] joined;

    // MSB sub-coefficient: terms 0..NH-1, relative to PLAN.hi_lsb.
    for (genvar i = 0; i < NH; i++) begin : g_hi
      localparam int SH = int'(PLAN.term[i].lsb) - int'(PLAN.hi_lsb);
      logic signed [HW-1:0] opnd;
      assign opnd = HW'(bcs[PLAN.term[i].sel]) <<< SH;
      if (i == 0) begin : g_first
        assign hacc[i] = opnd;
      end else begin : g_add
        assign hacc[i] = hacc[i-1] + opnd;
      end
    end

    if (NL > 0) begin : g_lo
      logic signed [LW-1:0] lacc [NL];
      // LSB sub-coefficient: terms NH..NT-1, scaled by its own order.
      for (genvar j = 0; j < NL; j++) begin : g_lo_t
        localparam int SH = int'(PLAN.term[NH+j].lsb) - int'(PLAN.lo_lsb);
        logic signed [LW-1:0] opnd;
        assign opnd = LW'(bcs[PLAN.term[NH+j].sel]) <<< SH;
        if (j == 0) begin : g_first
          assign lacc[j] = opnd;
        end else begin : g_add
          assign lacc[j] = lacc[j-1] + opnd;
        end
      end
      // Joining adder: realign the MSB half above the LSB half.
      assign joined = (FW'(hacc[NH-1]) <<< (int'(PLAN.hi_lsb) - int'(PLAN.lo_lsb)))
                      + FW'(lacc[NL-1]);
    end else begin : g_hi_only
      assign joined = hacc[NH-1];
    end

    assign mag_p = P_W'(joined) <<< BASE;
  end

  assign p = NEG ? -mag_p : mag_p;

endmodule
