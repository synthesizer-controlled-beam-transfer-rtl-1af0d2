// Synthesizer-controlled AGS-to-RHIC bunch transfer: the three synthesizers
// of the cogging system and the kicker trigger.
//
// All synthesizers run from the RHIC master clock, 1024 x Frev, which also is
// the VCO of the RHIC RF loop, so every output is locked to the beam:
//   * RF      - 360 x Frev, defines the 360 RHIC buckets and drives the
//               cavities; no hop counter.
//   * SYNCHRO - 19 x Frev, the AGS bunch frequency, sent to the AGS as the
//               reference of its RF loop; hop counter moves its phase.
//   * KICKER  - Frev / 4, the kicker clock from which the kicker trigger is
//               derived; hop counter moves its phase.
// A host writes each synthesizer's registers through one port (`wr_sel`
// picks the synthesizer).  One common `strobe` latches the delta phases into
// all three accumulators at once, so they start with a fixed phase relation.
// `cog_start` starts the synchro and kicker hops together: each spends its
// programmed number of clocks on delta phase B (slightly lower frequency),
// slipping the AGS bunches by the phase the host computed for the fill
// pattern.  The timing system arms the kicker with `kick_arm`; the kick is
// fired on the next kicker-clock zero crossing after both hops are over.
//
// Sine/cosine samples go to DACs and anti-alias filters outside this design.
// The three harmonics, the common clock and strobe, and the counters on the
// synchro and kicker synthesizers follow the published system; the shared
// host write port, the common start input and the busy/done handshake with
// the kicker trigger are this design's choices.
//
// Ports: a host write port (wr_en, wr_sel, wr_addr, wr_data); the control
// inputs strobe, cog_start and kick_arm; per synthesizer its phase, phase MSB
// and sine/cosine samples; cog_busy/cog_done and the kick outputs.  cog_busy
// and cog_done are combinational (cog_busy includes cog_start itself); the
// other outputs come from registers, and kick follows the kicker-clock wrap
// by one clock.
module rhic_cogging_top
  import cog_pkg::*;
#(
  parameter int unsigned W          = PHASE_W,
  parameter int unsigned LUT_ADDR_W = 12,
  parameter int unsigned AMP_W      = 12
) (
  input  logic                    clk,          // master clock, 1024 x Frev
  input  logic                    rst_n,
  // host register port
  input  logic                    wr_en,
  input  syn_sel_e                wr_sel,
  input  nco_reg_e                wr_addr,
  input  logic [W-1:0]            wr_data,
  // control
  input  logic                    strobe,       // common latch strobe
  input  logic                    cog_start,    // start the phase advance
  input  logic                    kick_arm,     // kicker enable, timing system
  // RF synthesizer, 360 x Frev
  output logic [W-1:0]            rf_phase,
  output logic                    rf_clk,       // phase MSB, square wave
  output logic signed [AMP_W-1:0] rf_sin,
  output logic signed [AMP_W-1:0] rf_cos,
  // synchro reference to the AGS, 19 x Frev
  output logic [W-1:0]            syn_phase,
  output logic                    syn_clk,
  output logic signed [AMP_W-1:0] syn_sin,
  output logic signed [AMP_W-1:0] syn_cos,
  // kicker clock, Frev / 4
  output logic [W-1:0]            kck_phase,
  output logic                    kck_clk,
  output logic signed [AMP_W-1:0] kck_sin,
  output logic signed [AMP_W-1:0] kck_cos,
  // cogging status and kicker trigger
  output logic                    cog_busy,
  output logic                    cog_done,     // pulse when both hops are over
  output logic                    kick_armed,
  output logic                    kick,
  output logic [15:0]             kick_count
);

  logic we_rf, we_syn, we_kck;
  logic rf_busy, rf_done;
  logic syn_busy, syn_done, kck_busy, kck_done;
  logic cog_busy_q;

  always_comb begin
    we_rf  = wr_en && (wr_sel == SYN_RF);
    we_syn = wr_en && (wr_sel == SYN_SYNCHRO);
    we_kck = wr_en && (wr_sel == SYN_KICKER);
  end

  nco #(.W(W), .LUT_ADDR_W(LUT_ADDR_W), .AMP_W(AMP_W), .HAS_COUNTER(1'b0)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .wr_en(we_rf), .wr_addr(wr_addr), .wr_data(wr_data),
    .strobe(strobe), .start(1'b0),
    .phase(rf_phase), .clk_out(rf_clk), .sin_out(rf_sin), .cos_out(rf_cos),
    .hop_busy(rf_busy), .hop_done(rf_done)
  );

  nco #(.W(W), .LUT_ADDR_W(LUT_ADDR_W), .AMP_W(AMP_W), .HAS_COUNTER(1'b1)) u_synchro (
    .clk(clk), .rst_n(rst_n),
    .wr_en(we_syn), .wr_addr(wr_addr), .wr_data(wr_data),
    .strobe(strobe), .start(cog_start),
    .phase(syn_phase), .clk_out(syn_clk), .sin_out(syn_sin), .cos_out(syn_cos),
    .hop_busy(syn_busy), .hop_done(syn_done)
  );

  nco #(.W(W), .LUT_ADDR_W(LUT_ADDR_W), .AMP_W(AMP_W), .HAS_COUNTER(1'b1)) u_kicker (
    .clk(clk), .rst_n(rst_n),
    .wr_en(we_kck), .wr_addr(wr_addr), .wr_data(wr_data),
    .strobe(strobe), .start(cog_start),
    .phase(kck_phase), .clk_out(kck_clk), .sin_out(kck_sin), .cos_out(kck_cos),
    .hop_busy(kck_busy), .hop_done(kck_done)
  );

  // The hop counters switch the mux one clock after cog_start; count the
  // start clock itself as busy so the kicker cannot fire in between.
  assign cog_busy = syn_busy || kck_busy || cog_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cog_busy_q <= 1'b0;
    else        cog_busy_q <= cog_busy;
  end
  assign cog_done = cog_busy_q && !cog_busy;

  kicker_trigger #(.CNT_W(16)) u_kick (
    .clk(clk), .rst_n(rst_n),
    .arm(kick_arm), .cog_busy(cog_busy), .kclk_msb(kck_clk),
    .armed(kick_armed), .kick(kick), .kick_count(kick_count)
  );

endmodule
