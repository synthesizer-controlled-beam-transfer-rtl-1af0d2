// End-to-end run of rhic_cogging_top at its default sizes, shared by the
// short and the full-size testbench.  It plays the front-end computer and
// the timing system:
//   1. programs the three synthesizers to 360, 19 and 1/4 x Frev with a
//      common strobe and checks the phase lock among them every clock;
//   2. for each of TRANSFERS transfers, computes the synchro and kicker hops
//      for a BUNCHES fill pattern and FILL_TIME_S between injections, starts
//      the phase advance, arms the kicker, and checks: the hops last the
//      computed number of clocks, the synthesizers end up lagging their
//      unhopped phase by exactly ticks * delta (and the intended advance to
//      within one delta), the RF synthesizer is untouched, and the kick comes
//      at the first kicker-clock zero crossing after the advance;
//   3. counts each mechanism (strobe latch, synchro hop, kicker hop, kick held
//      off by a running advance, kick fired) and fails any that never occurs.
// The wrapper that instantiates it prints the result when `done` rises.
module tb_cog_run
  import cog_pkg::*;
  import tb_cog_host_pkg::*;
#(
  parameter int  BUNCHES     = 60,
  parameter int  TRANSFERS   = 4,
  parameter real FILL_TIME_S = 0.0666667,
  parameter longint WATCHDOG_CLKS = 64'd100_000_000
) (
  output logic done,       // run finished (or watchdog expired)
  output int   checks,
  output int   failures
);
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, strobe = 1'b0, cog_start = 1'b0, kick_arm = 1'b0;
  syn_sel_e wr_sel = SYN_RF;
  nco_reg_e wr_addr = REG_DPHI_A;
  logic [W-1:0] wr_data = '0;
  logic [W-1:0] rf_phase, syn_phase, kck_phase;
  logic rf_clk, syn_clk, kck_clk;
  logic signed [11:0] rf_sin, rf_cos, syn_sin, syn_cos, kck_sin, kck_cos;
  logic cog_busy, cog_done, kick_armed, kick;
  logic [15:0] kick_count;

  rhic_cogging_top dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_addr, .wr_data, .strobe, .cog_start, .kick_arm,
    .rf_phase, .rf_clk, .rf_sin, .rf_cos,
    .syn_phase, .syn_clk, .syn_sin, .syn_cos,
    .kck_phase, .kck_clk, .kck_sin, .kck_cos,
    .cog_busy, .cog_done, .kick_armed, .kick, .kick_count
  );

  // nominal delta phases, 2^32 * h / 1024, worked out here in 64 bits
  localparam longint unsigned A_RF  = 64'd4294967296 * 360 / 1024;
  localparam longint unsigned A_SYN = 64'd4294967296 * 19 / 1024;
  localparam longint unsigned A_KCK = 64'd4294967296 / 4 / 1024;

  initial begin done = 1'b0; checks = 0; failures = 0; end
  longint cyc = 0;
  bit running = 1'b0;
  longint k = 0;                       // clocks since the strobe edge
  longint unsigned lag_syn = 0, lag_kck = 0;
  int n_strobe = 0, n_syn_hop = 0, n_kck_hop = 0, n_held = 0, n_kick = 0;
  int syn_busy_clks = 0, kck_busy_clks = 0;
  longint unsigned d_syn = 0, d_kck = 0;
  logic [W-1:0] syn_prev = '0, kck_prev = '0;
  bit kick_held_now = 1'b0;
  logic kck_msb_q = 1'b0;
  longint last_wrap = -1;

  always #5 clk = ~clk;

  // clock counters and watchdog
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) k <= k + 1;
    else if (strobe) running <= 1'b1;
    if (cyc > WATCHDOG_CLKS) begin
      failures++;
      $display("watchdog expired");
      done = 1'b1;
    end
  end

  // per-clock monitor
  always @(negedge clk) begin
    if (running && k >= 1) begin
      checks++;
      if (rf_phase !== W'(longint'(k - 1) * A_RF)) begin
        failures++;
        if (failures < 10) $display("rf phase %h at k=%0d", rf_phase, k);
      end
    end
    // a hop shows as a phase slope of A - delta instead of A
    if (d_syn != 0 && W'(syn_phase - syn_prev) == W'(A_SYN - d_syn)) syn_busy_clks++;
    if (d_kck != 0 && W'(kck_phase - kck_prev) == W'(A_KCK - d_kck)) kck_busy_clks++;
    syn_prev = syn_phase;
    kck_prev = kck_phase;
    if (kick_armed && cog_busy && !kick_held_now) begin
      kick_held_now = 1'b1;
      n_held++;
    end
    if (kck_msb_q && !kck_clk) last_wrap = cyc;
    kck_msb_q = kck_clk;
    if (kick) begin
      n_kick++;
      kick_held_now = 1'b0;
      checks++;
      if (cog_busy || last_wrap != cyc - 1) begin
        failures++;
        $display("kick at %0d: busy=%0d last wrap %0d", cyc, cog_busy, last_wrap);
      end
    end
  end

  task automatic write(input syn_sel_e s, input nco_reg_e a, input logic [W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_sel = s; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic pulse_strobe();
    @(negedge clk); strobe = 1'b1;
    @(negedge clk); strobe = 1'b0;
  endtask

  task automatic check_lags(input string when);
    @(negedge clk);
    checks += 2;
    if (syn_phase !== W'(longint'(k - 1) * A_SYN - lag_syn)) begin
      failures++;
      $display("%s: synchro phase %h want %h", when, syn_phase, W'(longint'(k - 1) * A_SYN - lag_syn));
    end
    if (kck_phase !== W'(longint'(k - 1) * A_KCK - lag_kck)) begin
      failures++;
      $display("%s: kicker phase %h want %h", when, kck_phase, W'(longint'(k - 1) * A_KCK - lag_kck));
    end
  endtask

  initial begin
    hop_t hs, hk;
    real  ps, pk;
    longint unsigned want_s, want_k;
    want_s = 0; want_k = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. program and latch with one strobe
    write(SYN_RF,      REG_DPHI_A, W'(A_RF));
    write(SYN_SYNCHRO, REG_DPHI_A, W'(A_SYN));
    write(SYN_KICKER,  REG_DPHI_A, W'(A_KCK));
    repeat (10) @(negedge clk);
    checks += 3;
    if (rf_phase != 0 || syn_phase != 0 || kck_phase != 0) begin
      failures++; $display("phase moved before the strobe");
    end
    @(negedge clk); strobe = 1'b1;
    @(posedge clk); n_strobe++;
    @(negedge clk); strobe = 1'b0;
    repeat (5000) @(negedge clk);
    check_lags("locked");
    // 2. transfers
    ps = synchro_deg(BUNCHES);
    pk = kicker_deg(BUNCHES);
    hs = plan(ps, FILL_TIME_S);
    hk = plan(pk, FILL_TIME_S);
    $display("pattern %0d bunches: synchro %.3f deg -> %0d ticks x %0d, kicker %.4f deg -> %0d ticks x %0d",
             BUNCHES, ps, hs.ticks, hs.delta, pk, hk.ticks, hk.delta);
    d_syn = hs.delta;
    d_kck = hk.delta;
    write(SYN_SYNCHRO, REG_DPHI_B, W'(A_SYN - hs.delta));
    write(SYN_SYNCHRO, REG_COUNT,  W'(hs.ticks));
    write(SYN_KICKER,  REG_DPHI_B, W'(A_KCK - hk.delta));
    write(SYN_KICKER,  REG_COUNT,  W'(hk.ticks));
    pulse_strobe(); n_strobe++;
    for (int t = 0; t < TRANSFERS; t++) begin
      automatic int sb0, kb0, kicks0;
      sb0 = syn_busy_clks; kb0 = kck_busy_clks; kicks0 = n_kick;
      @(negedge clk); cog_start = 1'b1; kick_arm = 1'b1;
      @(negedge clk); cog_start = 1'b0; kick_arm = 1'b0;
      wait (cog_done);
      n_syn_hop++; n_kck_hop++;
      lag_syn += hs.ticks * hs.delta;
      lag_kck += hk.ticks * hk.delta;
      want_s += hs.total; want_k += hk.total;
      repeat (3) @(negedge clk);
      check_lags($sformatf("transfer %0d", t));
      checks += 2;
      if (syn_busy_clks - sb0 != int'(hs.ticks) || kck_busy_clks - kb0 != int'(hk.ticks)) begin
        failures++;
        $display("hop lengths %0d %0d", syn_busy_clks - sb0, kck_busy_clks - kb0);
      end
      // accuracy of the advance: within one delta per transfer
      if ((lag_syn > want_s ? lag_syn - want_s : want_s - lag_syn) > hs.delta * (longint'(t) + 1) ||
          (lag_kck > want_k ? lag_kck - want_k : want_k - lag_kck) > hk.delta * (longint'(t) + 1)) begin
        failures++;
        $display("advance off target");
      end
      // kick within one kicker period after the advance
      for (int i = 0; i < 4200 && n_kick == kicks0; i++) @(negedge clk);
      checks++;
      if (n_kick != kicks0 + 1) begin failures++; $display("no kick in transfer %0d", t); end
      repeat (100) @(negedge clk);
    end
    checks++;
    if (kick_count != 16'(TRANSFERS)) begin failures++; $display("kick_count %0d", kick_count); end
    // 3. mechanisms
    $display("mechanisms: strobe %0d, synchro hop %0d, kicker hop %0d, kick held %0d, kick %0d",
             n_strobe, n_syn_hop, n_kck_hop, n_held, n_kick);
    checks += 5;
    if (n_strobe == 0)  failures++;
    if (n_syn_hop == 0) failures++;
    if (n_kck_hop == 0) failures++;
    if (n_held == 0)    failures++;
    if (n_kick == 0)    failures++;
    done = 1'b1;
  end
endmodule
