// tb_trigger_delay: for several delays (0, 1, 7, 300 and random) checks that
// start pulses exactly once, delay + 4 clocks after the edge that first
// samples the trigger high, and that a trigger during a running delay is
// ignored.
module tb_trigger_delay;
  logic clk = 0, rst = 1, trig_in = 0, start, counting;
  logic [31:0] delay = '0;
  int checks = 0, failures = 0, cycle = 0, n_start = 0, t_start = 0;

  trigger_delay #(.DELAY_W(32)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (start) begin n_start++; t_start = cycle; end

  task automatic shot(input int d, input bit retrig);
    int t0;
    delay = d;
    n_start = 0;
    @(negedge clk) trig_in = 1;
    @(posedge clk) t0 = cycle;   // first edge that samples it high
    @(negedge clk);
    repeat (3) @(negedge clk);
    trig_in = 0;
    if (retrig && d > 10) begin
      repeat (4) @(negedge clk);
      trig_in = 1;
      repeat (4) @(negedge clk);
      trig_in = 0;
    end
    repeat (d + 20) @(negedge clk);
    checks++;
    if (n_start != 1) begin failures++; $display("FAIL delay %0d: %0d starts", d, n_start); end
    checks++;
    if (t_start - t0 != d + 4) begin failures++; $display("FAIL delay %0d: start after %0d", d, t_start - t0); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    shot(0, 0); shot(1, 0); shot(7, 0); shot(300, 1);
    for (int i = 0; i < 10; i++) shot($urandom_range(0, 200), 1);
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
