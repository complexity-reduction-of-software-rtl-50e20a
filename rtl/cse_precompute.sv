// cse_precompute: the two 2-bit common subexpressions of the filter input.
//
// Every tap multiplier of the channel filter multiplies the same input x1,
// so the subexpressions that the coefficient recipes share are formed once
// here and fanned out to all taps:
//   x2 = x1 + x1>>2   (CSD pattern [1 0 1])
//   x3 = x1 - x1>>2   (CSD pattern [1 0 -1])
// To stay exact they are produced scaled by 4, as the integers 5*x1 and
// 3*x1; the taps account for the factor in their shifts. Negated patterns
// reuse the same signals with a subtraction in the tap.
//
// Purely combinational: one adder and one subtractor, no latency. The two
// subexpressions follow the method; the scaling by 4 is this design's way
// of keeping the right shift lossless.
module cse_precompute #(
  parameter int unsigned IN_W = cp_pkg::DEFAULT_IN_W
) (
  input  logic signed [IN_W-1:0] x1,
  output logic signed [IN_W+2:0] x2,   // 5*x1 = 4*(x1 + x1>>2)
  output logic signed [IN_W+2:0] x3    // 3*x1 = 4*(x1 - x1>>2)
);
  logic signed [IN_W+2:0] x1_ext;

  always_comb begin
    x1_ext = (IN_W+3)'(x1);
    x2 = (x1_ext <<< 2) + x1_ext;
    x3 = (x1_ext <<< 2) - x1_ext;
  end
endmodule
