// End-to-end test of rhic_cogging_top with a short time between injections
// (0.5 ms) so it runs in seconds: three transfers on a 60-bunch pattern.
// The design itself is at its default sizes.
module tb_rhic_cogging_top;
  logic done;
  int   checks, failures;

  tb_cog_run #(.BUNCHES(60), .TRANSFERS(3), .FILL_TIME_S(0.0005),
               .WATCHDOG_CLKS(64'd2_000_000)) run (
    .done(done), .checks(checks), .failures(failures)
  );
  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
