// Full-size run of rhic_cogging_top: one AGS pulse, four transfers on the
// 60-bunch pattern with the nominal 66 2/3 ms between injections
// (about 5.3 million master-clock cycles per transfer).
module tb_rhic_cogging_full;
  logic done;
  int   checks, failures;

  tb_cog_run #(.BUNCHES(60), .TRANSFERS(4), .FILL_TIME_S(0.0666667),
               .WATCHDOG_CLKS(64'd40_000_000)) run (
    .done(done), .checks(checks), .failures(failures)
  );
  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
