// Sine/cosine look-up table of a direct digital synthesizer.
//
// The top ADDR_W bits of the output phase address a ROM that holds one full
// period of a sine wave as AMP_W-bit two's complement samples:
//     rom[i] = round((2^(AMP_W-1) - 1) * sin(2*pi*i / 2^ADDR_W)).
// The cosine is read from the same table a quarter period ahead.  Both
// outputs are registered: one clock of latency.  The table is computed at
// elaboration time; its size (ADDR_W, AMP_W) is this design's choice, the
// document says only that a ROM maps phase to a sine or cosine amplitude.
module dds_sincos_lut #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned AMP_W  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        addr,     // phase, top bits
  output logic signed [AMP_W-1:0]  sin_out,
  output logic signed [AMP_W-1:0]  cos_out
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic signed [AMP_W-1:0] sample_t;

  function automatic sample_t sine_sample(int unsigned i);
    real amp, ang, v;
    amp = real'((1 << (AMP_W - 1)) - 1);
    ang = 2.0 * 3.14159265358979323846 * real'(i) / real'(DEPTH);
    v   = amp * $sin(ang);
    // round half away from zero
    return sample_t'((v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5));
  endfunction

  sample_t rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = sine_sample(i);
  end

  logic [ADDR_W-1:0] cos_addr;
  assign cos_addr = addr + ADDR_W'(DEPTH / 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      sin_out <= rom[addr];
      cos_out <= rom[cos_addr];
    end
  end

endmodule
