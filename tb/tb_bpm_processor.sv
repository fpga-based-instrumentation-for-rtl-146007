// tb_bpm_processor: four plates with independent random samples and
// pedestals; after each window every plate's latched sum must equal its own
// reference sum, done must rise once the window is through the pipeline and
// drop at the next start.
module tb_bpm_processor;
  localparam int NP = 4, ADC_W = 10, N = 32;
  logic clk = 0, rst = 1;
  logic [ADC_W-1:0] i_in [NP], q_in [NP], ped_i [NP], ped_q [NP];
  logic valid = 0, start = 0, done;
  logic [15:0] sums [NP];
  int checks = 0, failures = 0;
  int exp_sum [NP];

  bpm_processor #(.N_PLATES(NP), .ADC_W(ADC_W), .N_SAMPLES(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic int isq(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin i_in[p] = 0; q_in[p] = 0; ped_i[p] = 0; ped_q[p] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int w = 0; w < 6; w++) begin
      for (int p = 0; p < NP; p++) begin
        ped_i[p] = ADC_W'($urandom_range(400, 600));
        ped_q[p] = ADC_W'($urandom_range(400, 600));
        exp_sum[p] = 0;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      checks++;
      if (done) begin failures++; $display("FAIL done not cleared by start"); end
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        valid = 1;
        for (int p = 0; p < NP; p++) begin
          int di, dq;
          // plate p sees a signal of its own amplitude plus noise
          i_in[p] = ADC_W'(int'(ped_i[p]) + (p + 1) * 60 + $urandom_range(0, 20) - 10);
          q_in[p] = ADC_W'(int'(ped_q[p]) - (p + 1) * 40 + $urandom_range(0, 20) - 10);
          di = int'(i_in[p]) - int'(ped_i[p]);
          dq = int'(q_in[p]) - int'(ped_q[p]);
          exp_sum[p] += isq(di * di + dq * dq);
        end
        @(negedge clk) valid = 0;
        @(negedge clk);
      end
      repeat (20) @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (int'(sums[p]) != exp_sum[p]) begin
          failures++;
          $display("FAIL plate %0d sum %0d exp %0d", p, sums[p], exp_sum[p]);
        end
      end
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
