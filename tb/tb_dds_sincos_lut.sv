// Testbench for dds_sincos_lut: every address read, sine compared with
// $sin and cosine with $cos of the same angle (within one LSB for rounding),
// and the four quadrant points checked exactly.
module tb_dds_sincos_lut;
  localparam int unsigned ADDR_W = 12;
  localparam int unsigned AMP_W  = 12;
  localparam int unsigned DEPTH  = 1 << ADDR_W;
  localparam real         PI     = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic signed [AMP_W-1:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  dds_sincos_lut #(.ADDR_W(ADDR_W), .AMP_W(AMP_W)) dut (.clk, .rst_n, .addr, .sin_out, .cos_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(int got, real want);
    real d;
    d = real'(got) - want;
    return (d <= 1.0) && (d >= -1.0);
  endfunction

  initial begin
    real amp, ang;
    amp = 2.0 ** (AMP_W - 1) - 1.0;
    addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      addr = ADDR_W'(i);
      @(posedge clk); #1;
      ang = 2.0 * PI * real'(i) / real'(DEPTH);
      checks += 2;
      if (!near(int'(sin_out), amp * $sin(ang))) begin
        failures++; $display("sin[%0d] = %0d", i, sin_out);
      end
      if (!near(int'(cos_out), amp * $cos(ang))) begin
        failures++; $display("cos[%0d] = %0d", i, cos_out);
      end
      if (i == 0 || i == DEPTH / 4 || i == DEPTH / 2 || i == 3 * DEPTH / 4) begin
        int s_want, c_want;
        s_want = (i == DEPTH / 4) ? 2047 : (i == 3 * DEPTH / 4) ? -2047 : 0;
        c_want = (i == 0) ? 2047 : (i == DEPTH / 2) ? -2047 : 0;
        checks += 2;
        if (int'(sin_out) != s_want) begin failures++; $display("sin quadrant %0d", i); end
        if (int'(cos_out) != c_want) begin failures++; $display("cos quadrant %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
