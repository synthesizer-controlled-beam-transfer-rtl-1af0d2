// Shared constants and types of the AGS-to-RHIC cogging synthesizers.
//
// All three direct digital synthesizers run from one master clock at 1024
// times the RHIC revolution frequency (Frev) and use a 32-bit phase word, so
// one phase unit is 360 deg / 2^32.  The register map of a synthesizer's host
// port is this design's own choice; the four registers themselves (delta phase
// A, delta phase B, phase offset, hop count) are the ones the synthesizer has.
package cog_pkg;

  // Phase word width of the synthesizers' accumulators.
  localparam int unsigned PHASE_W = 32;

  // Master clock = CLK_PER_TURN * Frev.
  localparam int unsigned CLK_PER_TURN = 1024;

  // Host register addresses inside one synthesizer.
  typedef enum logic [1:0] {
    REG_DPHI_A  = 2'd0,  // delta phase A: nominal frequency
    REG_DPHI_B  = 2'd1,  // delta phase B: offset frequency used while hopping
    REG_OFFSET  = 2'd2,  // phase offset added after the accumulator
    REG_COUNT   = 2'd3   // number of clock cycles to spend on delta phase B
  } nco_reg_e;

  // Which synthesizer a host write goes to.
  typedef enum logic [1:0] {
    SYN_RF      = 2'd0,  // 360 x Frev: the RHIC bucket / cavity reference
    SYN_SYNCHRO = 2'd1,  // 19 x Frev: AGS synchro reference (with hop counter)
    SYN_KICKER  = 2'd2   // Frev / 4: kicker clock (with hop counter)
  } syn_sel_e;

  // Nominal delta phase words for the three harmonics of Frev:
  // dphi = 2^32 * h / 1024, all exact.
  localparam logic [PHASE_W-1:0] DPHI_RF360  = 32'(64'(360) << 22);  // 45 * 2^25
  localparam logic [PHASE_W-1:0] DPHI_SYN19  = 32'(64'(19) << 22);
  localparam logic [PHASE_W-1:0] DPHI_KICK4  = 32'(64'(1) << 20);    // h = 1/4

endpackage
