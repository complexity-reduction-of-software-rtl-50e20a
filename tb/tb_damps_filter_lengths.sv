// tb_damps_filter_lengths: the D-AMPS channel paths for the shorter filter
// lengths of the stop-band table (260, 610 and 940 taps, 16-bit
// coefficients, decimation by 350), each run end to end by
// channel_path_bench. The 1180-tap filter is covered by
// tb_cp_channel_filter_top_full.
module tb_damps_filter_lengths;
  localparam int NB = 3;
  logic done [NB];
  int   chk [NB];
  int   fail [NB];
  int   checks, failures;
  bit   timed_out = 0;

  channel_path_bench #(.N(260), .COEF_W(16), .FC(cp_pkg::DAMPS_FC_NORM), .DECIM(350), .NOUT(5))
    u_260 (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  channel_path_bench #(.N(610), .COEF_W(16), .FC(cp_pkg::DAMPS_FC_NORM), .DECIM(350), .NOUT(5))
    u_610 (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  channel_path_bench #(.N(940), .COEF_W(16), .FC(cp_pkg::DAMPS_FC_NORM), .DECIM(350), .NOUT(5))
    u_940 (.done(done[2]), .checks(chk[2]), .failures(fail[2]));

  task automatic report();
    checks = 0;
    failures = timed_out ? 1 : 0;
    for (int i = 0; i < NB; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #200000;
    timed_out = 1;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    #1;
    report();
    $finish;
  end
endmodule
