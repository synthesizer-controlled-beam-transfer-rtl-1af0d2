// Testbench for kicker_trigger, driven by a model kicker clock (a 32-bit
// phase advancing 2^20 per clock, one period every 4096 clocks).  Checks that
// an unarmed trigger never fires, that an armed one fires on the clock after
// the phase wraps through zero, that it waits while a phase advance is busy,
// and that it fires only once per arm.
module tb_kicker_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  logic arm, cog_busy;
  logic [31:0] kphase = 32'h1230_0000;
  logic armed, kick;
  logic [15:0] kick_count;
  int checks = 0, failures = 0;
  int cycle = 0;
  int wrap_cycle = -1;

  kicker_trigger dut (.clk, .rst_n, .arm, .cog_busy, .kclk_msb(kphase[31]),
                      .armed, .kick, .kick_count);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    kphase <= kphase + 32'h0010_0000;
    if (kphase == 32'hFFF0_0000) wrap_cycle <= cycle + 1;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for a kick, return the clock it appeared on (or -1)
  task automatic wait_kick(input int limit, output int at);
    at = -1;
    for (int i = 0; i < limit; i++) begin
      @(posedge clk); #1;
      if (kick) begin at = cycle; break; end
    end
  endtask

  initial begin
    int at;
    arm = 0; cog_busy = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // unarmed: nothing for two kicker periods
    wait_kick(8200, at);
    checks++; if (at != -1) begin failures++; $display("unarmed kick"); end
    // armed, idle: fires one clock after the wrap to zero
    arm = 1; @(posedge clk); #1; arm = 0;
    checks++; if (!armed) failures++;
    wait_kick(5000, at);
    checks++;
    if (at == -1 || at != wrap_cycle + 1) begin
      failures++; $display("kick at %0d, wrap at %0d", at, wrap_cycle);
    end
    checks++; if (kick_count != 1 || armed) failures++;
    // fires once per arm
    wait_kick(8200, at);
    checks++; if (at != -1) begin failures++; $display("second kick without arm"); end
    // armed while busy: no kick during two periods of busy
    arm = 1; cog_busy = 1; @(posedge clk); #1; arm = 0;
    wait_kick(8200, at);
    checks++; if (at != -1) begin failures++; $display("kick while busy"); end
    cog_busy = 0;
    wait_kick(5000, at);
    checks++;
    if (at == -1 || at != wrap_cycle + 1) begin
      failures++; $display("kick after busy at %0d, wrap at %0d", at, wrap_cycle);
    end
    checks++; if (kick_count != 2) failures++;
    // random arm times and busy windows
    for (int r = 0; r < 20; r++) begin
      repeat ($urandom_range(1, 5000)) @(posedge clk);
      #1 arm = 1; cog_busy = 1; @(posedge clk); #1 arm = 0;
      repeat ($urandom_range(0, 6000)) begin
        @(posedge clk); #1;
        checks++; if (kick) begin failures++; $display("kick while busy"); end
      end
      cog_busy = 0;
      wait_kick(5000, at);
      checks++;
      if (at == -1 || at != wrap_cycle + 1) begin
        failures++; $display("random %0d: kick at %0d, wrap at %0d", r, at, wrap_cycle);
      end
    end
    checks++; if (kick_count != 22) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
