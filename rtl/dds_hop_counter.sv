// Hop counter of the synchro and kicker synthesizers.
//
// When triggered by `start`, the counter loads the programmed cycle count and
// holds `sel_b` high for exactly that many clock cycles, beginning with the
// clock after `start`; the synthesizer's delta phase mux uses it to switch
// from register A to register B.  When the count runs out, `done` pulses for
// one clock and `sel_b` drops, returning the synthesizer to delta phase A.
// A count of zero gives no hop and no `done`.  A `start` while a hop is
// running restarts it with the new count.  The 32-bit width and the A-to-B
// switch for a programmed number of clocks are the published behaviour; the
// down-counter, the one-clock start latency and the restart rule are this
// design's choices.
module dds_hop_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,   // one-clock trigger
  input  logic [W-1:0] count,   // number of clocks to apply delta phase B
  output logic         sel_b,   // high while delta phase B is applied
  output logic         done     // one-clock pulse when the hop ends
);

  logic [W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        remaining <= count;
      end else if (remaining != '0) begin
        remaining <= remaining - 1'b1;
        if (remaining == W'(1)) done <= 1'b1;
      end
    end
  end

  assign sel_b = (remaining != '0);

endmodule
