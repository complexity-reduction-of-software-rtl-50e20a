// tb_pdc_channel_filter: the PDC channel path, 1000 taps with 24-bit
// coefficients, run end to end by channel_path_bench. The prototype cutoff
// (12.5 kHz, half the 25 kHz channel spacing, at 25.6 MHz) and the
// decimation by 256 are choices of this testbench; the PDC example fixes
// only the rate, the spacing, the length and the coefficient wordlength.
module tb_pdc_channel_filter;
  logic done;
  int   checks, failures;

  channel_path_bench #(.N(1000), .COEF_W(24), .FC(12500.0 / 25.6e6), .DECIM(256), .NOUT(6))
    u_pdc (.done(done), .checks(checks), .failures(failures));

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
