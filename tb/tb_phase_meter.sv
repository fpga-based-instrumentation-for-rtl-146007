// tb_phase_meter: synthesizes the samples a 53 MHz carrier of known phase
// gives when sampled at 4/7 of its frequency (each sample 630 degrees after
// the previous), with an ADC offset and +-2 LSB noise, and checks the
// measured phase against the true one to within 0.3 degree, over the whole
// circle including the octant boundaries. It also checks the result latency
// (LUT_BITS + 4 clocks after the block's last sample) and that one result
// comes per 4*ACC_CYCLES samples.
module tb_phase_meter;
  localparam int ACC = 16, LUT_BITS = 8, LAT = LUT_BITS + 4;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, valid = 0, sync = 0, phase_valid;
  logic signed [11:0] adc = '0;
  logic [15:0] phase;
  logic signed [16:0] i_sum, q_sum;
  int checks = 0, failures = 0, cycle = 0, last_cycle = 0, n_results = 0;
  real phi_deg;

  phase_meter #(.ADC_W(12), .ACC_CYCLES(ACC), .LUT_BITS(LUT_BITS), .PHASE_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (!rst && phase_valid) begin
    real got, err;
    n_results++;
    got = real'(phase) * 360.0 / 65536.0;
    err = got - phi_deg;
    if (err > 180.0) err -= 360.0;
    if (err < -180.0) err += 360.0;
    checks++;
    if (err > 0.3 || err < -0.3) begin
      failures++;
      $display("FAIL phi=%f measured %f", phi_deg, got);
    end
    checks++;
    if (cycle - last_cycle != LAT) begin failures++; $display("FAIL latency %0d", cycle - last_cycle); end
  end

  task automatic measure(input real deg, input real amp);
    phi_deg = deg;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    for (int n = 0; n < 4 * ACC; n++) begin
      real x;
      x = amp * $cos(deg * PI / 180.0 + real'(n) * 7.0 * PI / 2.0) + 37.0
          + real'($urandom_range(0, 4)) - 2.0;
      @(negedge clk);
      adc = 12'($rtoi(x < 0 ? x - 0.5 : x + 0.5));
      valid = 1;
      if (n == 4 * ACC - 1) last_cycle = cycle;
      @(negedge clk) valid = 0;
    end
    repeat (LAT + 3) @(negedge clk);
  endtask

  initial begin
    int expected;
    repeat (3) @(posedge clk);
    rst = 0;
    expected = 0;
    for (int k = 0; k < 16; k++) begin measure(real'(k) * 45.0, 1800.0); expected++; end
    for (int k = 0; k < 60; k++) begin
      measure(real'($urandom_range(0, 35999)) / 100.0, real'($urandom_range(300, 2000)));
      expected++;
    end
    measure(359.9, 1000.0); expected++;
    measure(0.1, 1000.0); expected++;
    checks++;
    if (n_results != expected) begin failures++; $display("FAIL %0d results for %0d blocks", n_results, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
