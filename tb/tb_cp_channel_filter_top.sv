// tb_cp_channel_filter_top: end-to-end test of the channel path at reduced size (64 taps, decimation by 7).
//
// Random wideband samples with random gaps in in_valid go through shared
// subexpressions, the CP channel filter and the decimator. Every kept
// output is compared with h * x evaluated here by direct convolution at
// the kept instants n = m*DECIM, and must appear two clocks after the
// sample that completes it. The test also counts how often each mechanism
// of the design occurs and fails if one never does: taps that use the
// [1 0 1] subexpression, the [1 0 -1] subexpression, a negated
// subexpression, a plain input term, taps split into MSB and LSB parts,
// odd spans, zero taps, input stalls and decimated outputs.
module tb_cp_channel_filter_top;
  localparam int unsigned N      = 64;
  localparam int unsigned DECIM  = 7;
  localparam real         FC     = 0.05;
  localparam int unsigned IN_W   = cp_pkg::DEFAULT_IN_W;
  localparam int unsigned COEF_W = cp_pkg::DAMPS_COEF_W;
  localparam int unsigned ACC_W  = IN_W + COEF_W + $clog2(N);
  localparam int NOUT = 60;                    // decimated outputs to check
  localparam int NSAMP = (NOUT - 1) * DECIM + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y_out;

  int checks = 0, failures = 0;
  int n_x2 = 0, n_x3 = 0, n_negcs = 0, n_x1 = 0, n_split = 0, n_odd = 0, n_zero = 0;
  int n_stall = 0, n_out = 0;
  int cycle = 0;
  int coef [N];
  int xs [NSAMP];
  int xs_cycle [NSAMP];
  int sent = 0;

  cp_channel_filter_top #(.N(N), .FC_NORM(FC), .DECIM(DECIM)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check each decimated output against the direct convolution.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      int idx;
      idx = n_out * int'(DECIM);
      e = 0;
      for (int k = 0; k < int'(N); k++)
        if (idx - k >= 0) e += longint'(coef[k]) * longint'(xs[idx - k]);
      checks += 2;
      if (longint'(y_out) != e) begin
        failures++;
        if (failures < 20) $display("output %0d: y=%0d expected %0d", n_out, y_out, e);
      end
      if (cycle != xs_cycle[idx] + 2) begin
        failures++;
        if (failures < 20) $display("output %0d at cycle %0d, sample taken at %0d", n_out, cycle, xs_cycle[idx]);
      end
      n_out++;
    end
  end

  initial begin
    // Coefficient recipes, worked out from the same design rules.
    for (int k = 0; k < int'(N); k++) begin
      int nt, n1;
      bit has2, has3, hasn, has1;
      coef[k] = cp_pkg::lowpass_coef(k, N, COEF_W, FC);
      nt = cp_pkg::tap_num_terms(coef[k], COEF_W);
      n1 = cp_pkg::tap_split(coef[k], COEF_W);
      has2 = 0; has3 = 0; hasn = 0; has1 = 0;
      for (int j = 0; j < nt; j++) begin
        cp_pkg::term_t t;
        t = cp_pkg::term_at(coef[k], COEF_W, j);
        if (t.src == cp_pkg::SRC_X2) has2 = 1;
        if (t.src == cp_pkg::SRC_X3) has3 = 1;
        if (t.src != cp_pkg::SRC_X1 && t.neg) hasn = 1;
        if (t.src == cp_pkg::SRC_X1) has1 = 1;
      end
      n_x2 += has2; n_x3 += has3; n_negcs += hasn; n_x1 += has1;
      if (nt == 0) n_zero++;
      if (nt > n1) n_split++;
      if (cp_pkg::tap_span(coef[k], COEF_W) % 2 == 1) n_odd++;
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (sent < NSAMP) begin
      int v;
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      v = int'($urandom % (1 << IN_W)) - (1 << (IN_W - 1));
      x_in = IN_W'(v);
      @(posedge clk);
      #1;
      if (in_valid) begin
        xs[sent] = v;
        xs_cycle[sent] = cycle;
        sent++;
      end else begin
        n_stall++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);

    checks++;
    if (n_out != NOUT) begin
      failures++;
      $display("%0d decimated outputs, expected %0d", n_out, NOUT);
    end
    $display("taps: [1 0 1] %0d, [1 0 -1] %0d, negated CS %0d, plain x1 %0d, split %0d, odd span %0d, zero %0d",
             n_x2, n_x3, n_negcs, n_x1, n_split, n_odd, n_zero);
    $display("input stalls %0d, decimated outputs %0d", n_stall, n_out);
    checks += 9;
    if (n_x2 == 0)    begin failures++; $display("no tap uses [1 0 1]"); end
    if (n_x3 == 0)    begin failures++; $display("no tap uses [1 0 -1]"); end
    if (n_negcs == 0) begin failures++; $display("no negated subexpression"); end
    if (n_x1 == 0)    begin failures++; $display("no plain input term"); end
    if (n_split == 0) begin failures++; $display("no partitioned tap"); end
    if (n_odd == 0)   begin failures++; $display("no odd span"); end
    if (n_zero == 0)  begin failures++; $display("no zero tap"); end
    if (n_stall == 0) begin failures++; $display("no input stall"); end
    if (n_out == 0)   begin failures++; $display("no decimated output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
