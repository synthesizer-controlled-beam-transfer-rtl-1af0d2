// Workload: a complete fill of 55 bunches on a 60-bunch pattern, one transfer
// every 66 2/3 ms (about 290 million master-clock cycles), checking after each
// transfer that the synchro reference and kicker clock have slipped by the
// planned phase and that the kicker fired once.
module tb_rhic_fill_55of60;
  logic done;
  int   checks, failures;

  tb_cog_run #(.BUNCHES(60), .TRANSFERS(55), .FILL_TIME_S(0.0666667),
               .WATCHDOG_CLKS(64'd320_000_000)) run (
    .done(done), .checks(checks), .failures(failures)
  );
  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
