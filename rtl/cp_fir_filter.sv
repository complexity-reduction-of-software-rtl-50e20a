// cp_fir_filter: N-tap channel filter whose coefficient multipliers are CP
// shift-and-add multipliers.
//
// The filter is in transposed direct form, so every tap multiplies the
// same current input sample. That makes the multiplier block a multiple-
// constant multiplication of one signal: the subexpressions x2 and x3 are
// formed once outside (cse_precompute) and every tap k is a cp_tap_mult
// with its own constant h[k]. The products are added into a delay line of
// partial sums:
//
//   z[N-1] <= p[N-1],   z[k] <= p[k] + z[k+1],   y <= p[0] + z[1]
//
// which gives y[n] = sum_k h[k] x[n-k] at full precision (ACC_W bits, no
// rounding or overflow for any input).
//
// Coefficients: h[k] = cp_pkg::lowpass_coef(k, N, COEF_W, FC_NORM), a
// Blackman-windowed sinc quantised to COEF_W fractional bits. The method
// applies to any coefficient set; this prototype and its cutoff are this
// design's own choice.
//
// Timing: one sample per cycle in which in_valid is high; the delay line
// only moves on such cycles, so gaps in the input stall the filter. y and
// out_valid appear one clock after the sample. rst_n (asynchronous, active
// low) clears the delay line and the output.
module cp_fir_filter #(
  parameter int unsigned N       = cp_pkg::DAMPS_TAPS,
  parameter int unsigned IN_W    = cp_pkg::DEFAULT_IN_W,
  parameter int unsigned COEF_W  = cp_pkg::DAMPS_COEF_W,
  parameter real         FC_NORM = cp_pkg::DAMPS_FC_NORM,
  parameter int unsigned ACC_W   = IN_W + COEF_W + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x1,
  input  logic signed [IN_W+2:0]  x2,
  input  logic signed [IN_W+2:0]  x3,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y
);
  localparam int unsigned P_W = IN_W + COEF_W;

  logic signed [P_W-1:0]   p [N];
  logic signed [ACC_W-1:0] z [N+1];   // z[N] is a constant zero

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam int C = cp_pkg::lowpass_coef(k, N, COEF_W, FC_NORM);
    cp_tap_mult #(
      .IN_W  (IN_W),
      .COEF_W(COEF_W),
      .COEF  (C),
      .OUT_W (P_W)
    ) u_mult (
      .x1(x1), .x2(x2), .x3(x3), .y(p[k])
    );
  end

  assign z[N] = '0;

  for (genvar k = 1; k < N; k++) begin : g_delay
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        z[k] <= '0;
      else if (in_valid) z[k] <= ACC_W'(p[k]) + z[k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= ACC_W'(p[0]) + z[1];
    end
  end
endmodule
