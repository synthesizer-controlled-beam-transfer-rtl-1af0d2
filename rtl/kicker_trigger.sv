// Kicker trigger derived from the Frev/4 kicker clock.
//
// The AGS target bunch passes the kicker on every fourth RHIC turn, so the
// trigger is taken from the kicker-clock synthesizer running at Frev/4.  The
// timing system arms the trigger once per transfer (`arm`).  While the
// cogging phase advance is still running (`cog_busy`) the trigger waits;
// after it has finished, the next positive-going zero crossing of the kicker
// clock (its phase wrapping from 2^W-1 to 0, seen as the phase MSB falling)
// fires `kick` for one clock and disarms.  `kick_count` counts the kicks
// since reset.  The arming and wait-for-phase-advance rule is this design's
// reading of the document; it gives the function, not the circuit.
module kicker_trigger #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,          // kicker enable from the timing system
  input  logic             cog_busy,     // a phase advance is in progress
  input  logic             kclk_msb,     // MSB of the kicker-clock phase
  output logic             armed,
  output logic             kick,         // one-clock trigger pulse
  output logic [CNT_W-1:0] kick_count
);

  logic msb_q;
  logic zero_cross;

  assign zero_cross = msb_q && !kclk_msb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msb_q      <= 1'b0;
      armed      <= 1'b0;
      kick       <= 1'b0;
      kick_count <= '0;
    end else begin
      msb_q <= kclk_msb;
      kick  <= 1'b0;
      if (armed && !cog_busy && zero_cross) begin
        kick       <= 1'b1;
        armed      <= 1'b0;
        kick_count <= kick_count + 1'b1;
      end else if (arm) begin
        armed <= 1'b1;
      end
    end
  end

endmodule
