// bcs_gen: shared generator of the binary common subexpressions.
//
// Every tap of the filter multiplies the same input sample, so the odd
// multiples of the input that the binary coefficient patterns need are formed
// once here and fanned out to all taps:
//   [1]    ->  1x  (no adder)
//   [11]   ->  3x  = x + (x << 1)
//   [101]  ->  5x  = x + (x << 2)
//   [111]  ->  7x  = 3x + (x << 2)    (reuses 3x, as the method does)
//   [1001] ->  9x  = x + (x << 3)
// Four adders in all. [011] and [110] need no adder of their own: they are 3x
// with a shift, which the tap applies. The set of patterns and the reuse of
// [11] for [111] follow the BSE-CPM method; the integer (left-shift) form is this
// design's choice.
//
// Interface: x is a signed DATA_W-bit sample; bcs[s] holds the multiple that
// fir_pkg::bcs_sel_e value s stands for, sign-extended to DATA_W+4 bits.
// Timing: purely combinational.
module bcs_gen
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic signed [DATA_W-1:0]   x,
  output logic signed [DATA_W+3:0]   bcs [NUM_BCS]
);

  localparam int unsigned BW = DATA_W + 4;

  logic signed [BW-1:0] x1, x3;

  always_comb begin
    x1          = BW'(x);
    x3          = x1 + (x1 <<< 1);
    bcs[BCS_X1] = x1;
    bcs[BCS_X3] = x3;
    bcs[BCS_X5] = x1 + (x1 <<< 2);
    bcs[BCS_X7] = x3 + (x1 <<< 2);
    bcs[BCS_X9] = x1 + (x1 <<< 3);
  end

endmodule
