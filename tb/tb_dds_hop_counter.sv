// Testbench for dds_hop_counter: sel_b must be high for exactly the
// programmed number of clocks, starting the clock after start; done must
// pulse once at the end; a zero count gives no hop; a restart reloads.
module tb_dds_hop_counter;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [W-1:0] count;
  logic sel_b, done;
  int checks = 0, failures = 0;

  dds_hop_counter #(.W(W)) dut (.clk, .rst_n, .start, .count, .sel_b, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // start a hop of n clocks and measure it
  task automatic hop(input int n);
    int high, dones, first_high;
    count = W'(n);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    high = 0; dones = 0; first_high = -1;
    for (int c = 0; c < n + 5; c++) begin
      if (sel_b) begin
        high++;
        if (first_high < 0) first_high = c;
      end
      @(posedge clk); #1;
      if (done) begin
        dones++;
        checks++;
        if (c != n - 1) begin failures++; $display("done at %0d for n=%0d", c, n); end
      end
    end
    checks++;
    if (high != n) begin failures++; $display("sel_b %0d clocks, want %0d", high, n); end
    checks++;
    if (n > 0 && first_high != 0) begin failures++; $display("sel_b starts late"); end
    checks++;
    if (dones != (n > 0 ? 1 : 0)) begin failures++; $display("%0d done pulses", dones); end
  endtask

  initial begin
    start = 1'b0; count = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (sel_b || done) failures++;
    hop(1);
    hop(2);
    hop(17);
    hop(0);
    for (int i = 0; i < 10; i++) hop(int'($urandom_range(1, 3000)));
    // restart while running: total high time = 5 + 40
    count = 40; start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    repeat (5) @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    begin
      int high = 0;
      for (int c = 0; c < 60; c++) begin
        if (sel_b) high++;
        @(posedge clk); #1;
      end
      checks++;
      if (high != 40) begin failures++; $display("restart: %0d", high); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
