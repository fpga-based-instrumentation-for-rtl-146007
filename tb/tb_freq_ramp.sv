// tb_freq_ramp: runs upward, downward, single-step and empty ramps with a
// receiver that acks every request at once, and checks every tuning word
// handed over against the expected arithmetic sequence (clamped at the end
// value), the interval between steps, and that busy ends with the ramp.
module tb_freq_ramp;
  logic clk = 0, rst = 1, go = 0, ack, req, busy;
  logic [31:0] ftw_start = '0, ftw_end = '0, ftw_step = '0, ftw;
  logic [15:0] interval = '0;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] got [$];
  int          got_t [$];

  freq_ramp #(.FTW_W(32), .INTERVAL_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  assign ack = req;
  always @(posedge clk) if (req) begin got.push_back(ftw); got_t.push_back(cycle); end

  task automatic ramp(input logic [31:0] s, input logic [31:0] e, input logic [31:0] st, input int iv);
    logic [31:0] x;
    int n;
    got.delete(); got_t.delete();
    ftw_start = s; ftw_end = e; ftw_step = st; interval = 16'(iv);
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    x = s; n = 0;
    while (1) begin
      checks++;
      if (n >= got.size() || got[n] != x) begin
        failures++; $display("FAIL ramp step %0d: got %h exp %h", n, n < got.size() ? got[n] : 0, x);
        break;
      end
      if (n > 0) begin
        checks++;
        if (got_t[n] - got_t[n-1] != iv) begin failures++; $display("FAIL step interval %0d", got_t[n] - got_t[n-1]); end
      end
      n++;
      if (x == e) break;
      if (e > x) x = (e - x <= st) ? e : x + st;
      else       x = (x - e <= st) ? e : x - st;
    end
    checks++;
    if (got.size() != n) begin failures++; $display("FAIL %0d words for %0d", got.size(), n); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    ramp(32'h4000_0000, 32'h4000_1000, 32'h100, 5);     // 16 steps up, exact
    ramp(32'h4000_1000, 32'h3FFF_F000, 32'h300, 3);     // down, last step clamped
    ramp(32'h1234_5678, 32'h1234_5678, 32'h10, 4);      // nothing to ramp
    ramp(32'h0000_0000, 32'h0000_0001, 32'hFFFF, 2);    // one clamped step
    ramp(32'h8000_0000, 32'h8001_0000, 32'h1111, 1);    // one step per clock
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
