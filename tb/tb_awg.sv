// tb_awg: loads a random waveform into the RAM (checking read-back), then
// sends orbit markers with different lengths and checks that the DAC shows
// word k exactly 4 + k clocks after the edge that samples the marker, the
// mid-scale code outside playback, and that length 0 plays the whole RAM.
module tb_awg;
  localparam int DEPTH = 64, DAC_W = 10;
  logic clk = 0, rst = 1, orbit_sync = 0, wr_en = 0, playing;
  logic [6:0] length = '0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [DAC_W-1:0] wr_data = '0, rd_data, dac_data;
  logic [15:0] n_orbits;
  int checks = 0, failures = 0, cycle = 0;
  logic [DAC_W-1:0] wave [DEPTH];

  awg #(.DEPTH(DEPTH), .DAC_W(DAC_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic orbit(input int len);
    int t0, n;
    n = (len == 0) ? DEPTH : len;
    length = 7'(len);
    @(negedge clk) orbit_sync = 1;
    @(posedge clk) t0 = cycle;
    for (int c = 1; c <= n + 8; c++) begin
      @(posedge clk);
      #1;
      if (c == 2) orbit_sync = 0;
      if (c >= 4 && c < 4 + n) begin
        checks++;
        if (dac_data != wave[c - 4]) begin failures++; $display("FAIL len %0d word %0d: %h exp %h", len, c - 4, dac_data, wave[c - 4]); end
      end else if (c >= 4 + n || c < 3) begin
        checks++;
        if (dac_data != 10'h200) begin failures++; $display("FAIL idle code %h at %0d", dac_data, c); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      wave[a] = DAC_W'($urandom);
      @(negedge clk) begin wr_en = 1; wr_addr = 6'(a); wr_data = wave[a]; end
    end
    @(negedge clk) wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk) rd_addr = 6'(a);
      @(negedge clk);
      checks++;
      if (rd_data != wave[a]) begin failures++; $display("FAIL readback %0d", a); end
    end
    orbit(10); orbit(1); orbit(0); orbit(37);
    checks++;
    if (n_orbits != 4) begin failures++; $display("FAIL orbit count %0d", n_orbits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
