// Numerically controlled oscillator with frequency hop (one DDS channel).
//
// This is the synthesizer of the cogging system: delta phase registers A and
// B feed a mux, the mux feeds a 32-bit phase accumulator, a phase ALU adds the
// phase-offset register, and the top bits of the resulting phase address a
// sine/cosine look-up table.  A hop counter, when started, switches the mux
// from A to B for a programmed number of clock cycles, so the output is moved
// by exactly count * (B - A) phase units and then returns to frequency A.
//
// Host port: a write of `wr_data` to register `wr_addr` (see cog_pkg::nco_reg_e)
// when `wr_en` is high.  Delta phase A and B are written to holding registers
// and only reach the accumulator on `strobe`; reset clears the accumulator
// and the active delta phases, so the output phase stays at the phase offset
// until the first strobe.  One strobe wired to several synthesizers gives them
// a common starting phase.  The phase offset and the hop count take effect as
// soon as they are written (this design's choice).
//
// Timing: the accumulator updates one clock after `strobe` or the mux changes;
// `phase` is the accumulator plus offset one clock later, `sin_out`/`cos_out`
// one clock after that.  `clk_out` is the top bit of `phase`, a square wave at
// the synthesizer frequency.  With HAS_COUNTER = 0 (the 360 Frev RF
// synthesizer) there is no hop counter and `start` is ignored.
module nco
  import cog_pkg::*;
#(
  parameter int unsigned W           = 32,  // phase accumulator width
  parameter int unsigned LUT_ADDR_W  = 12,  // phase bits that address the LUT
  parameter int unsigned AMP_W       = 12,  // LUT sample width
  parameter bit          HAS_COUNTER = 1'b1
) (
  input  logic                    clk,       // master clock, 1024 x Frev
  input  logic                    rst_n,
  // host register port
  input  logic                    wr_en,
  input  nco_reg_e                wr_addr,
  input  logic [W-1:0]            wr_data,
  // control
  input  logic                    strobe,    // latch delta phases into the accumulator
  input  logic                    start,     // start a hop to delta phase B
  // outputs
  output logic [W-1:0]            phase,     // accumulator + offset
  output logic                    clk_out,   // phase MSB
  output logic signed [AMP_W-1:0] sin_out,
  output logic signed [AMP_W-1:0] cos_out,
  output logic                    hop_busy,  // delta phase B selected
  output logic                    hop_done   // one-clock pulse at end of hop
);

  // holding registers written by the host
  logic [W-1:0] dphi_a_hold, dphi_b_hold, offset_q, count_q;
  // delta phases latched into the accumulator by the strobe
  logic [W-1:0] dphi_a_act, dphi_b_act;
  logic [W-1:0] dphi_sel, acc_phase;
  logic         sel_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dphi_a_hold <= '0;
      dphi_b_hold <= '0;
      offset_q    <= '0;
      count_q     <= '0;
    end else if (wr_en) begin
      unique case (wr_addr)
        REG_DPHI_A: dphi_a_hold <= wr_data;
        REG_DPHI_B: dphi_b_hold <= wr_data;
        REG_OFFSET: offset_q    <= wr_data;
        REG_COUNT:  count_q     <= wr_data;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dphi_a_act <= '0;
      dphi_b_act <= '0;
    end else if (strobe) begin
      dphi_a_act <= dphi_a_hold;
      dphi_b_act <= dphi_b_hold;
    end
  end

  if (HAS_COUNTER) begin : g_counter
    dds_hop_counter #(.W(W)) u_counter (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .count (count_q),
      .sel_b (sel_b),
      .done  (hop_done)
    );
  end else begin : g_no_counter
    assign sel_b    = 1'b0;
    assign hop_done = 1'b0;
  end

  assign hop_busy = sel_b;

  // delta phase mux (A / B)
  assign dphi_sel = sel_b ? dphi_b_act : dphi_a_act;

  dds_phase_accumulator #(.W(W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .dphi  (dphi_sel),
    .phase (acc_phase)
  );

  dds_phase_alu #(.W(W)) u_alu (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_in  (acc_phase),
    .offset    (offset_q),
    .phase_out (phase)
  );

  assign clk_out = phase[W-1];

  dds_sincos_lut #(.ADDR_W(LUT_ADDR_W), .AMP_W(AMP_W)) u_lut (
    .clk     (clk),
    .rst_n   (rst_n),
    .addr    (phase[W-1 -: LUT_ADDR_W]),
    .sin_out (sin_out),
    .cos_out (cos_out)
  );

endmodule
