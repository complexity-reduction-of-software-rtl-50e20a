// cp_tap_mult: constant-coefficient multiplier built with the coefficient-
// partitioning (CP) method.
//
// Computes y = x1 * COEF exactly, where COEF is a COEF_W-bit fractional
// coefficient held as the integer COEF * 2^COEF_W. No multiplier is used:
// at elaboration cp_pkg turns COEF into CSD digits, pairs them into the
// shared subexpressions x2 ([1 0 1]) and x3 ([1 0 -1]), expresses the
// result in pseudo floating point (a common shift and a span M) and splits
// the span into an MSB part h1 (relative position <= floor(M/2)) and an
// LSB part h2. The hardware is then
//
//   h2 = sum of its terms, aligned to the lowest digit of h2   (adder chain)
//   h1 = sum of its terms, aligned to the lowest digit of h1   (adder chain)
//   s  = (h1 << (e1 - e2)) + h2                                (final adder)
//   y  = s << e2                                               (wiring)
//
// so the inner adders only span their own part of the coefficient and only
// the final adder has the full width; the PFP shift and the alignment of
// h2 are free wiring after the additions. For the document's example
// coefficient 0.0000101001010101 (COEF = 'h0A55) this is x2 + 2^-5(x2 +
// 2^-4 x2), three adders counting the shared x2 adder.
//
// Interface: x1 is the input sample, x2/x3 come from cse_precompute
// (5*x1 and 3*x1). Purely combinational, no latency.
//
// The recipe (CSD, 2-bit CSE, PFP, split in two halves) follows the
// method. Design choices: left shifts instead of right shifts so that no
// bit is dropped; each part is summed as a chain of adders in MSB-first
// order; partial-sum widths are the smallest that hold the part's worst
// case for an IN_W-bit input.
module cp_tap_mult #(
  parameter int unsigned IN_W   = cp_pkg::DEFAULT_IN_W,
  parameter int unsigned COEF_W = cp_pkg::DAMPS_COEF_W,
  parameter int          COEF   = 'h0A55,
  parameter int unsigned OUT_W  = IN_W + COEF_W
) (
  input  logic signed [IN_W-1:0]  x1,
  input  logic signed [IN_W+2:0]  x2,
  input  logic signed [IN_W+2:0]  x3,
  output logic signed [OUT_W-1:0] y
);
  import cp_pkg::*;

  localparam int NT = tap_num_terms(COEF, COEF_W);      // nonzero terms after CSE
  localparam int N1 = tap_split(COEF, COEF_W);          // terms in MSB part h1
  localparam int N2 = NT - N1;                          // terms in LSB part h2
  localparam int SPAN  = tap_span(COEF, COEF_W);        // PFP span M
  // PFP shift as a count of right shifts from the binary point (0 if COEF = 0).
  localparam int SHIFT = (NT > 0) ? int'(COEF_W) - lead_exp(term_at(COEF, COEF_W, 0)) : 0;

  localparam int E1 = (NT > 0) ? int'(term_at(COEF, COEF_W, (N1 > 0) ? N1 - 1 : 0).e) : 0;
  localparam int E2 = (N2 > 0) ? int'(term_at(COEF, COEF_W, NT - 1).e) : E1;
  localparam int W1 = (N1 > 0) ? part_width(COEF, COEF_W, 0, N1, E1, IN_W) : 1;
  localparam int W2 = (N2 > 0) ? part_width(COEF, COEF_W, N1, NT, E2, IN_W) : 1;
  localparam int WS = (NT > 0) ? part_width(COEF, COEF_W, 0, NT, E2, IN_W) : 1;

  if (NT == 0) begin : g_zero
    // A zero coefficient needs no hardware.
    assign y = '0;
  end else begin : g_mult
    logic signed [W1-1:0] acc1 [N1+1];
    logic signed [W2-1:0] acc2 [N2+1];
    logic signed [WS-1:0] sum;

    assign acc1[0] = '0;
    assign acc2[0] = '0;

    // MSB part h1: chain of adders, each operand shifted only within h1.
    for (genvar j = 0; j < N1; j++) begin : g_h1
      localparam term_t T = term_at(COEF, COEF_W, j);
      localparam int SH = int'(T.e) - E1;
      logic signed [W1-1:0] op;
      if (T.src == SRC_X1)      begin : g_s1 assign op = W1'(x1) <<< SH; end
      else if (T.src == SRC_X2) begin : g_s2 assign op = W1'(x2) <<< SH; end
      else                      begin : g_s3 assign op = W1'(x3) <<< SH; end
      if (j == 0) begin : g_first
        assign acc1[j+1] = T.neg ? -op : op;
      end else begin : g_add
        assign acc1[j+1] = T.neg ? acc1[j] - op : acc1[j] + op;
      end
    end

    // LSB part h2, scaled by its own order: chain of adders.
    for (genvar j = 0; j < N2; j++) begin : g_h2
      localparam term_t T = term_at(COEF, COEF_W, N1 + j);
      localparam int SH = int'(T.e) - E2;
      logic signed [W2-1:0] op;
      if (T.src == SRC_X1)      begin : g_s1 assign op = W2'(x1) <<< SH; end
      else if (T.src == SRC_X2) begin : g_s2 assign op = W2'(x2) <<< SH; end
      else                      begin : g_s3 assign op = W2'(x3) <<< SH; end
      if (j == 0) begin : g_first
        assign acc2[j+1] = T.neg ? -op : op;
      end else begin : g_add
        assign acc2[j+1] = T.neg ? acc2[j] - op : acc2[j] + op;
      end
    end

    // Final adder: the only place where the inner shift of h2 shows up.
    if (N2 > 0) begin : g_final
      assign sum = (WS'(acc1[N1]) <<< (E1 - E2)) + WS'(acc2[N2]);
    end else begin : g_single
      assign sum = WS'(acc1[N1]);
    end

    // PFP shift: pure wiring after all additions.
    assign y = OUT_W'(sum) <<< E2;
  end
endmodule
