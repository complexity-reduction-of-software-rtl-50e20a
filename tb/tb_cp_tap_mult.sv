// tb_cp_tap_mult: checks CP multipliers for a set of constant coefficients
// against plain multiplication, y == x1 * COEF exactly, for random and
// extreme inputs. x2 and x3 are driven by the testbench as 5*x1 and 3*x1.
//
// The set covers the worked example 0.0000101001010101 ('h0A55, whose
// recipe must be x2 + 2^-5 (x2 + 2^-4 x2): three x2 terms, span 9, shift 5,
// one term in the MSB part), the [1 0 -1] pattern, negated patterns,
// single-digit and zero coefficients, odd and even spans, extreme values,
// and one 24-bit coefficient.
module tb_cp_tap_mult;
  localparam int unsigned W = 12;
  localparam int NC = 12;
  localparam int COEFS [NC] = '{
    'h0A55,     // worked example
    -'h0A55,    // negated patterns
    'h0300,     // 0000001100000000 -> CSD 10-100000000: [1 0 -1]
    'h4000,     // single digit
    0,          // zero tap
    'h7FFF,     // largest positive
    -'h8000 + 1,// largest negative
    'h1234,
    -'h2DB7,
    'h0001,
    'h5555,     // long run of [1 0 1]
    -'h3A6F
  };

  logic signed [W-1:0] x1;
  logic signed [W+2:0] x2, x3;
  logic signed [W+15:0] y [NC];
  logic signed [W+23:0] y24;
  int checks = 0, failures = 0;

  localparam int C24 = 'h5A3C71;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    cp_tap_mult #(.IN_W(W), .COEF_W(16), .COEF(COEFS[i])) dut (.x1(x1), .x2(x2), .x3(x3), .y(y[i]));
  end
  cp_tap_mult #(.IN_W(W), .COEF_W(24), .COEF(C24)) dut24 (.x1(x1), .x2(x2), .x3(x3), .y(y24));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int v);
    x1 = W'(v);
    x2 = (W+3)'(5 * v);
    x3 = (W+3)'(3 * v);
    #1;
    for (int i = 0; i < NC; i++) begin
      longint exp_v;
      exp_v = longint'(v) * longint'(COEFS[i]);
      checks++;
      if (longint'(y[i]) != exp_v) begin
        failures++;
        if (failures < 20) $display("coef %0d x1=%0d: y=%0d expected %0d", COEFS[i], v, y[i], exp_v);
      end
    end
    checks++;
    if (longint'(y24) != longint'(v) * longint'(C24)) begin
      failures++;
      if (failures < 20) $display("24-bit coef x1=%0d: y=%0d", v, y24);
    end
  endtask

  initial begin
    // Structure of the worked example (Fig. 2 of the method).
    checks += 5;
    if (g_dut[0].dut.NT != 3)    begin failures++; $display("example: %0d terms", g_dut[0].dut.NT); end
    if (g_dut[0].dut.N1 != 1)    begin failures++; $display("example: %0d MSB terms", g_dut[0].dut.N1); end
    if (g_dut[0].dut.SPAN != 9)  begin failures++; $display("example: span %0d", g_dut[0].dut.SPAN); end
    if (g_dut[0].dut.SHIFT != 5) begin failures++; $display("example: shift %0d", g_dut[0].dut.SHIFT); end
    if (g_dut[2].dut.NT != 1 || cp_pkg::term_at(COEFS[2], 16, 0).src != cp_pkg::SRC_X3) begin
      failures++; $display("[1 0 -1] pattern not used for 'h0300");
    end
    apply(-(1 << (W - 1)));
    apply((1 << (W - 1)) - 1);
    apply(0);
    apply(1);
    apply(-1);
    for (int n = 0; n < 3000; n++) apply(int'($urandom % (1 << W)) - (1 << (W - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
