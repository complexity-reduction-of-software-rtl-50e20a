// cp_channel_filter_top: one channel path of an SDR filter-bank channelizer
// with coefficient-partitioned channel filter.
//
// The wideband input x_in (one sample per cycle with in_valid) goes through
//   cse_precompute - forms the shared subexpressions x2 = 5*x_in and
//                    x3 = 3*x_in once for all taps,
//   cp_fir_filter  - the N-tap channel filter, every tap a CP shift-and-add
//                    multiplier, transposed direct form,
//   decimator      - keeps every DECIM-th filter output.
// Defaults are the D-AMPS channel filter: 1180 taps, 16-bit coefficients,
// decimation by 350 (34.02 MHz in, 97.2 kHz out).
//
// Timing: the filter output is registered (1 clock) and the decimator
// registers again (1 clock), so a kept output appears two clocks after the
// sample that completes it; out_valid is a one-cycle strobe. rst_n is
// asynchronous, active low. Input width, output width (full precision)
// and handshake are this design's choices.
module cp_channel_filter_top #(
  parameter int unsigned N       = cp_pkg::DAMPS_TAPS,
  parameter int unsigned IN_W    = cp_pkg::DEFAULT_IN_W,
  parameter int unsigned COEF_W  = cp_pkg::DAMPS_COEF_W,
  parameter real         FC_NORM = cp_pkg::DAMPS_FC_NORM,
  parameter int unsigned DECIM   = cp_pkg::DAMPS_DECIM,
  parameter int unsigned ACC_W   = IN_W + COEF_W + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] y_out
);
  logic signed [IN_W+2:0]  x2, x3;
  logic                    fir_valid;
  logic signed [ACC_W-1:0] fir_y;

  cse_precompute #(.IN_W(IN_W)) u_cse (
    .x1(x_in), .x2(x2), .x3(x3)
  );

  cp_fir_filter #(
    .N(N), .IN_W(IN_W), .COEF_W(COEF_W), .FC_NORM(FC_NORM), .ACC_W(ACC_W)
  ) u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .x1(x_in), .x2(x2), .x3(x3),
    .out_valid(fir_valid), .y(fir_y)
  );

  decimator #(.W(ACC_W), .FACTOR(DECIM)) u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(fir_valid), .in_data(fir_y),
    .out_valid(out_valid), .out_data(y_out)
  );
endmodule
