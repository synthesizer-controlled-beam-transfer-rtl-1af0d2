// Testbench for dds_phase_accumulator: random and fixed delta phase words,
// each output compared with a 64-bit reference sum taken modulo 2^32, and the
// output frequency checked by counting MSB wraps over a known interval.
module tb_dds_phase_accumulator;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] dphi, phase;
  int checks = 0, failures = 0;
  longint unsigned ref_sum;

  dds_phase_accumulator #(.W(W)) dut (.clk, .rst_n, .dphi, .phase);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps;
    logic msb_prev;
    dphi = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase stays 0 with dphi = 0
    repeat (4) @(posedge clk);
    #1 checks++; if (phase !== 0) failures++;
    // random words, checked every clock
    ref_sum = 0;
    for (int i = 0; i < 2000; i++) begin
      dphi = $urandom();
      @(posedge clk); #1;
      ref_sum = ref_sum + longint'(dphi);
      checks++;
      if (phase !== W'(ref_sum)) begin
        failures++;
        $display("mismatch at %0d: got %h want %h", i, phase, W'(ref_sum));
      end
    end
    // frequency: dphi = 2^32/64 gives one MSB wrap per 64 clocks
    dphi = 32'h0400_0000;
    @(posedge clk); #1;
    wraps = 0; msb_prev = phase[W-1];
    for (int i = 0; i < 64 * 10; i++) begin
      @(posedge clk); #1;
      if (msb_prev && !phase[W-1]) wraps++;
      msb_prev = phase[W-1];
    end
    checks++;
    if (wraps != 10) begin failures++; $display("wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
