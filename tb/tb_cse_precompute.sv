// tb_cse_precompute: checks the shared subexpressions against plain
// multiplication, x2 = 5*x1 and x3 = 3*x1, over every input value of a
// 12-bit sample (and the two extremes of a 16-bit one).
module tb_cse_precompute;
  localparam int unsigned W = 12;
  localparam int unsigned WB = 16;

  logic signed [W-1:0]  x1;
  logic signed [W+2:0]  x2, x3;
  logic signed [WB-1:0] xb;
  logic signed [WB+2:0] xb2, xb3;
  int checks = 0, failures = 0;

  cse_precompute #(.IN_W(W))  dut   (.x1(x1), .x2(x2), .x3(x3));
  cse_precompute #(.IN_W(WB)) dut_b (.x1(xb), .x2(xb2), .x3(xb3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      x1 = W'(v);
      #1;
      checks += 2;
      if (int'(x2) != 5 * v) begin
        failures++;
        if (failures < 10) $display("x1=%0d: x2=%0d expected %0d", v, x2, 5 * v);
      end
      if (int'(x3) != 3 * v) begin
        failures++;
        if (failures < 10) $display("x1=%0d: x3=%0d expected %0d", v, x3, 3 * v);
      end
    end
    for (int k = 0; k < 2; k++) begin
      int v;
      v = (k == 0) ? -(1 << (WB - 1)) : (1 << (WB - 1)) - 1;
      xb = WB'(v);
      #1;
      checks += 2;
      if (int'(xb2) != 5 * v || int'(xb3) != 3 * v) begin
        failures++;
        $display("x1=%0d (16 bit): x2=%0d x3=%0d", v, xb2, xb3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
