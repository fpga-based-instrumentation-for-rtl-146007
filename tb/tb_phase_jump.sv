// tb_phase_jump: checks that a jump before any phase measurement sends
// nothing and sets missed; that after measurements the request carries the
// top 14 bits of (latest measured phase + offset), modulo a turn, and holds
// until ack; and that the request follows the trigger by 3 clocks.
module tb_phase_jump;
  logic clk = 0, rst = 1, jump_trig = 0, mi_phase_valid = 0, ack = 0;
  logic [15:0] mi_phase = '0, offset = '0, jump_phase;
  logic req, jumped, missed;
  logic [13:0] pow;
  int checks = 0, failures = 0, cycle = 0;

  phase_jump #(.PHASE_W(16), .POW_W(14)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic trigger(output int t0);
    @(negedge clk) jump_trig = 1;
    @(posedge clk) t0 = cycle;
    repeat (4) @(negedge clk);
    jump_trig = 0;
  endtask

  initial begin
    int t0, t_req;
    logic [15:0] sum;
    repeat (3) @(posedge clk);
    rst = 0;
    trigger(t0);
    repeat (4) @(negedge clk);
    checks++;
    if (req || !missed) begin failures++; $display("FAIL jump without measurement"); end
    for (int k = 0; k < 20; k++) begin
      // a few measurements; the last one counts
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk) begin mi_phase = 16'($urandom); mi_phase_valid = 1; end
        @(negedge clk) mi_phase_valid = 0;
      end
      offset = 16'($urandom);
      if (k == 0) begin mi_phase = 16'hF000; offset = 16'h2000; end
      if (k == 0) begin @(negedge clk) mi_phase_valid = 1; @(negedge clk) mi_phase_valid = 0; end
      sum = mi_phase + offset;
      fork
        trigger(t0);
        begin
          @(posedge clk iff req);
          t_req = cycle;
        end
      join
      checks++;
      if (t_req - t0 != 3) begin failures++; $display("FAIL request %0d clocks after trigger", t_req - t0); end
      checks++;
      if (pow != sum[15:2] || jump_phase != sum || missed) begin
        failures++; $display("FAIL pow %h exp %h", pow, sum[15:2]);
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
      checks++;
      if (!req) begin failures++; $display("FAIL request dropped before ack"); end
      @(negedge clk) ack = 1;
      @(negedge clk) ack = 0;
      checks++;
      if (req) begin failures++; $display("FAIL request kept after ack"); end
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
