// tb_cp_fir_filter: runs two reduced channel filters (31 taps with 16-bit
// coefficients, 20 taps with 24-bit coefficients) on random input with
// random gaps in in_valid, and compares every output with a direct
// convolution y[n] = sum_k h[k] x[n-k] computed here with ordinary
// multiplication. Also checks the one-clock latency (out_valid follows
// in_valid by exactly one clock) and that reset clears the delay line.
module tb_cp_fir_filter;
  localparam int unsigned W  = 12;
  localparam int unsigned NA = 31, BA = 16;
  localparam int unsigned NB = 20, BB = 24;
  localparam real FCA = 0.1, FCB = 0.17;
  localparam int unsigned AWA = W + BA + $clog2(NA);
  localparam int unsigned AWB = W + BB + $clog2(NB);
  localparam int NSAMP = 600;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] x1 = '0;
  logic signed [W+2:0] x2, x3;
  logic va, vb;
  logic signed [AWA-1:0] ya;
  logic signed [AWB-1:0] yb;
  int checks = 0, failures = 0, stalls = 0;

  int hist [$];        // input history, newest first
  longint exp_a, exp_b;
  logic exp_valid;

  cse_precompute #(.IN_W(W)) u_cse (.x1(x1), .x2(x2), .x3(x3));
  cp_fir_filter #(.N(NA), .IN_W(W), .COEF_W(BA), .FC_NORM(FCA)) dut_a (
    .clk, .rst_n, .in_valid, .x1, .x2, .x3, .out_valid(va), .y(ya));
  cp_fir_filter #(.N(NB), .IN_W(W), .COEF_W(BB), .FC_NORM(FCB)) dut_b (
    .clk, .rst_n, .in_valid, .x1, .x2, .x3, .out_valid(vb), .y(yb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_out(int n, int b, real fc);
    longint s = 0;
    for (int k = 0; k < n && k < hist.size(); k++)
      s += longint'(cp_pkg::lowpass_coef(k, n, b, fc)) * longint'(hist[k]);
    return s;
  endfunction

  // Compare outputs one clock after each cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (va !== exp_valid || vb !== exp_valid) begin
        failures++;
        $display("out_valid %b/%b, expected %b", va, vb, exp_valid);
      end
      if (exp_valid) begin
        checks += 2;
        if (longint'(ya) != exp_a) begin
          failures++;
          if (failures < 20) $display("filter A: y=%0d expected %0d", ya, exp_a);
        end
        if (longint'(yb) != exp_b) begin
          failures++;
          if (failures < 20) $display("filter B: y=%0d expected %0d", yb, exp_b);
        end
      end
    end
  end

  task automatic run(int nsamp, int gap_pct, bit extremes);
    int sent = 0;
    while (sent < nsamp) begin
      int v;
      @(negedge clk);
      in_valid = (($urandom % 100) >= gap_pct);
      if (extremes) v = ($urandom % 2) ? (1 << (W - 1)) - 1 : -(1 << (W - 1));
      else          v = int'($urandom % (1 << W)) - (1 << (W - 1));
      x1 = W'(v);
      @(posedge clk);
      #1;
      exp_valid = in_valid;
      if (in_valid) begin
        hist.push_front(v);
        exp_a = ref_out(NA, BA, FCA);
        exp_b = ref_out(NB, BB, FCB);
        sent++;
      end else begin
        stalls++;
      end
    end
  endtask

  initial begin
    exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(NSAMP, 30, 1'b0);
    run(100, 0, 1'b1);          // full-scale inputs: worst-case growth
    // Reset in the middle of a stream: the delay line must start empty.
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    exp_valid = 1'b0;
    hist.delete();
    @(negedge clk);
    rst_n = 1'b1;
    run(80, 10, 1'b0);
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1 exp_valid = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("no input gaps were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
