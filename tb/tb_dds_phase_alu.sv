// Testbench for dds_phase_alu: random phase and offset words, the registered
// sum compared one clock later with a reference sum modulo 2^32.
module tb_dds_phase_alu;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] phase_in, offset, phase_out;
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;

  dds_phase_alu #(.W(W)) dut (.clk, .rst_n, .phase_in, .offset, .phase_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_in = '0; offset = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // after reset with the accumulator at zero the output is the offset
    offset = 32'h4000_0000;
    @(posedge clk); #1;
    checks++; if (phase_out !== 32'h4000_0000) failures++;
    for (int i = 0; i < 1000; i++) begin
      phase_in = $urandom(); offset = $urandom();
      expect_q = W'(64'(phase_in) + 64'(offset));
      @(posedge clk); #1;
      checks++;
      if (phase_out !== expect_q) begin
        failures++;
        $display("mismatch: got %h want %h", phase_out, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
