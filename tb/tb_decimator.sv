// tb_decimator: feeds a counting sequence with random gaps in in_valid and
// checks that exactly every FACTOR-th valid sample comes out, first one
// included, one clock after it was presented.
module tb_decimator;
  localparam int unsigned W = 16;
  localparam int unsigned FACTOR = 5;
  localparam int NSAMP = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  int expect_next;   // index of the next sample that must come out
  logic pending;
  logic signed [W-1:0] pending_val;

  decimator #(.W(W), .FACTOR(FACTOR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check: an output must appear exactly one clock after a kept sample.
  always @(posedge clk) begin
    if (rst_n) begin
      if (pending) begin
        checks++;
        if (!out_valid || out_data !== pending_val) begin
          failures++;
          $display("expected sample %0d at output, out_valid=%b data=%0d", pending_val, out_valid, out_data);
        end
        got++;
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("unexpected output %0d", out_data);
      end
    end
  end

  initial begin
    pending = 1'b0;
    expect_next = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < NSAMP) begin
      @(negedge clk);
      if (($urandom % 4) != 0) begin
        in_valid = 1'b1;
        in_data  = W'(sent * 7 + 3);
      end else begin
        in_valid = 1'b0;
      end
      @(posedge clk);
      #1;
      pending = 1'b0;
      if (in_valid) begin
        if (sent == expect_next) begin
          pending = 1'b1;
          pending_val = W'(sent * 7 + 3);
          expect_next += FACTOR;
        end
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1 pending = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (got != (NSAMP + FACTOR - 1) / FACTOR) begin
      failures++;
      $display("got %0d outputs, expected %0d", got, (NSAMP + FACTOR - 1) / FACTOR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
