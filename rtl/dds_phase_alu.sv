// Phase ALU of a direct digital synthesizer.
//
// Adds the phase-offset register to the accumulator phase, modulo 2^W, so the
// absolute phase of the output can be set independently of the accumulator.
// After reset, with the accumulator at zero, the output phase equals the
// offset.  The sum is registered: one clock of latency.  That the ALU is a
// plain adder and that it is registered is this design's reading; the
// published block diagram only names a phase ALU fed by a phase-offset
// register.
module dds_phase_alu #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] phase_in,   // from the phase accumulator
  input  logic [W-1:0] offset,     // phase-offset register
  output logic [W-1:0] phase_out   // phase_in + offset, one clock later
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_out <= '0;
    else        phase_out <= phase_in + offset;
  end

endmodule
