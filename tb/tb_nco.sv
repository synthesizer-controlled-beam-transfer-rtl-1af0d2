// Testbench for nco, one synthesizer channel.
//
// Checks, against closed-form phase values worked out in the testbench:
//   * after reset the output phase is the phase offset, and stays there until
//     the strobe latches the delta phase words;
//   * after the strobe the phase grows by delta phase A every clock;
//   * a new A written without a strobe changes nothing, the strobe applies it;
//   * a hop holds the slope at delta phase B for exactly the programmed
//     count, leaving the phase moved by count * (B - A);
//   * sine/cosine samples follow the phase one clock later;
//   * a channel built without a hop counter ignores start.
module tb_nco;
  import cog_pkg::*;
  localparam int unsigned W = 32;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, strobe, start;
  nco_reg_e wr_addr;
  logic [W-1:0] wr_data;
  logic [W-1:0] phase, phase2;
  logic clk_out, clk_out2, hop_busy, hop_done, hop_busy2, hop_done2;
  logic signed [11:0] sin_out, cos_out, sin2, cos2;
  int checks = 0, failures = 0;

  nco #(.W(W)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .strobe, .start,
    .phase, .clk_out, .sin_out, .cos_out, .hop_busy, .hop_done
  );
  nco #(.W(W), .HAS_COUNTER(1'b0)) dut_nc (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .strobe, .start,
    .phase(phase2), .clk_out(clk_out2), .sin_out(sin2), .cos_out(cos2),
    .hop_busy(hop_busy2), .hop_done(hop_done2)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input nco_reg_e a, input logic [W-1:0] d);
    wr_en = 1'b1; wr_addr = a; wr_data = d;
    @(posedge clk); #1;
    wr_en = 1'b0;
  endtask

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  function automatic int sin_of(input logic [W-1:0] p, input bit is_cos);
    real ang;
    ang = 2.0 * PI * real'(p[W-1 -: 12]) / 4096.0;
    return is_cos ? $rtoi($floor(2047.0 * $cos(ang) + 0.5)) : $rtoi($floor(2047.0 * $sin(ang) + 0.5));
  endfunction

  localparam logic [W-1:0] A   = 32'h0123_4567;
  localparam logic [W-1:0] A2  = 32'h0200_0000;
  localparam logic [W-1:0] B   = 32'h011F_0000;
  localparam logic [W-1:0] OFS = 32'h8000_0000;
  localparam int           N   = 777;

  initial begin
    logic [W-1:0] p0, prev, lut_phase;
    int busy_clks, dones;
    wr_en = 0; strobe = 0; start = 0; wr_addr = REG_DPHI_A; wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    write(REG_OFFSET, OFS);
    write(REG_DPHI_A, A);
    write(REG_DPHI_B, B);
    write(REG_COUNT, 32'(N));
    // no strobe yet: phase is the offset and does not move
    repeat (20) begin
      @(posedge clk); #1;
      expect_eq("pre-strobe phase", phase, OFS);
    end
    // strobe: the accumulator takes A on this edge, phase shows it 2 clocks on
    strobe = 1'b1;
    @(posedge clk); #1;
    strobe = 1'b0;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk); #1;
      expect_eq("slope A", phase, OFS + W'(n - 1) * A);
      expect_eq("no-counter twin", phase2, phase);
    end
    // sine/cosine follow the phase by one clock
    for (int n = 0; n < 300; n++) begin
      lut_phase = phase;
      @(posedge clk); #1;
      checks += 2;
      if (int'(sin_out) - sin_of(lut_phase, 0) > 1 || sin_of(lut_phase, 0) - int'(sin_out) > 1) begin
        failures++; $display("sin %0d vs %0d", sin_out, sin_of(lut_phase, 0));
      end
      if (int'(cos_out) - sin_of(lut_phase, 1) > 1 || sin_of(lut_phase, 1) - int'(cos_out) > 1) begin
        failures++; $display("cos %0d vs %0d", cos_out, sin_of(lut_phase, 1));
      end
    end
    // hop: B for exactly N clocks
    p0 = phase;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    busy_clks = 0; dones = 0;
    for (int n = 1; n <= N + 50; n++) begin
      prev = phase;
      if (hop_busy) busy_clks++;
      checks++;
      if (hop_busy2 || hop_done2) begin failures++; $display("no-counter twin hopped"); end
      @(posedge clk); #1;
      if (hop_done) dones++;
      if (n > 3 && n < N) expect_eq("slope B", phase - prev, B);
    end
    checks++;
    if (busy_clks != N) begin failures++; $display("busy %0d clocks", busy_clks); end
    checks++;
    if (dones != 1) begin failures++; $display("%0d done pulses", dones); end
    // net phase: (N + 51) clocks after p0, N of them at B
    expect_eq("phase after hop", phase, p0 + W'(N + 51) * A + W'(N) * (B - A));
    expect_eq("twin unmoved", phase2, p0 + W'(N + 51) * A);
    // new A without strobe: still slope A; with strobe: slope A2
    write(REG_DPHI_A, A2);
    prev = phase;
    @(posedge clk); #1;
    expect_eq("A held until strobe", phase - prev, A);
    strobe = 1'b1;
    @(posedge clk); #1;
    strobe = 1'b0;
    @(posedge clk); #1;
    prev = phase;
    @(posedge clk); #1;
    expect_eq("A2 after strobe", phase - prev, A2);
    // clk_out is the phase MSB
    checks++;
    if (clk_out !== phase[W-1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
