// Phase accumulator of a direct digital synthesizer.
//
// Every clock the accumulator adds the delta phase word to its own output,
// modulo 2^W:  phase(t+1) = phase(t) + dphi.  With W = 32 the phase resolution
// is 360 deg / 2^32 and the output frequency is Fclock * dphi / 2^32.  Reset
// clears the phase to zero, as the synthesizer does.  The new phase appears one
// clock after dphi is presented.  The 32-bit width and the reset to zero are
// those of the published synthesizer; the asynchronous active-low reset is
// this design's choice.
module dds_phase_accumulator #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] dphi,   // delta phase word for this clock
  output logic [W-1:0] phase   // accumulated phase, modulo 2^W
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + dphi;
  end

endmodule
