// tb_bpm_plate: feeds one plate channel ADC-rate samples (one every 2 or 3
// clocks, as 20 MSPS in a 53.1 MHz clock), opens integration windows at
// random points, and compares each sum with an independently computed
// sum over the 32 window samples of floor(sqrt((I-pedI)^2 + (Q-pedQ)^2)).
// It also checks that done follows the last window sample by the pipeline
// latency of 14 clocks, and that samples outside the window are ignored.
module tb_bpm_plate;
  localparam int ADC_W = 10, N = 32, LAT = 14;
  logic clk = 0, rst = 1;
  logic [ADC_W-1:0] i_in = '0, q_in = '0, ped_i = '0, ped_q = '0;
  logic valid = 0, start = 0, done;
  logic [15:0] sum;
  int checks = 0, failures = 0, cycle = 0;
  int exp_sum, last_cycle, win_left;

  bpm_plate #(.ADC_W(ADC_W), .N_SAMPLES(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int isq(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  always @(posedge clk) if (!rst && done) begin
    checks++;
    if (int'(sum) != exp_sum) begin failures++; $display("FAIL sum %0d exp %0d", sum, exp_sum); end
    checks++;
    if (cycle - last_cycle != LAT) begin failures++; $display("FAIL latency %0d", cycle - last_cycle); end
  end

  task automatic sample();
    int di, dq;
    @(negedge clk);
    i_in = ADC_W'($urandom); q_in = ADC_W'($urandom);
    valid = 1;
    if (win_left > 0) begin
      di = int'(i_in) - int'(ped_i);
      dq = int'(q_in) - int'(ped_q);
      exp_sum += isq(di * di + dq * dq);
      win_left--;
      if (win_left == 0) last_cycle = cycle;
    end
    @(negedge clk) valid = 0;
    if ($urandom_range(0, 1)) @(negedge clk);
  endtask

  initial begin
    win_left = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int w = 0; w < 12; w++) begin
      ped_i = ADC_W'($urandom); ped_q = ADC_W'($urandom);
      if (w == 0) begin ped_i = 0; ped_q = 0; end
      if (w == 1) begin ped_i = '1; ped_q = 10'd512; end
      repeat ($urandom_range(0, 5)) sample();       // outside any window
      @(negedge clk);
      start = 1;
      exp_sum = 0;
      win_left = N;
      @(negedge clk) start = 0;
      repeat (N + 4) sample();                      // window plus samples after it
      repeat (LAT + 2) @(negedge clk);
    end
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
