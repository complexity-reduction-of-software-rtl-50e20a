// decimator: keeps one sample in every FACTOR of the channel filter output.
//
// The channel filter runs at the wideband rate (34.02 MHz for D-AMPS); a
// 30 kHz channel is taken out of it at 1/350 of that rate. A modulo-FACTOR
// phase counter advances on every valid input sample; the sample taken at
// phase 0 is passed on, so the first valid sample after reset is kept and
// then every FACTOR-th one.
//
// Timing: registered, one clock from in_valid to out_valid; out_valid is a
// one-cycle strobe. rst_n (asynchronous, active low) resets the phase.
// The factor follows the document; the phase choice is this design's.
module decimator #(
  parameter int unsigned W      = 40,
  parameter int unsigned FACTOR = cp_pkg::DAMPS_DECIM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);
  localparam int unsigned CNT_W = (FACTOR > 1) ? $clog2(FACTOR) : 1;

  logic [CNT_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && (phase == '0);
      if (in_valid && phase == '0) out_data <= in_data;
      if (in_valid) phase <= (phase == CNT_W'(FACTOR - 1)) ? '0 : phase + 1'b1;
    end
  end

  initial assert (FACTOR >= 1) else $error("decimator: FACTOR must be at least 1");
endmodule
