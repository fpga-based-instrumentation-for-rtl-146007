// tb_tclk_decoder: an encoder drives a biphase-mark event line at 10 MHz
// against the 53.1 MHz clock (here scaled so that one bit cell lasts 5.31
// clock periods, as on the board), with a little random jitter on every
// transition and a random phase between line and clock. It sends random
// event codes separated by one to five idle cells, a frame with a wrong
// parity bit and a stretch of dead line, and checks that every good frame
// comes out once, in order, with its code, that the bad one raises parity_err
// only, and how long after the parity cell the event is reported.
module tb_tclk_decoder;
  timeunit 1ns;
  timeprecision 1ps;
  localparam realtime CELL = 53.1ns;   // 100 ns of line time in 18.83 ns clocks, scaled to 10 ns clocks
  logic clk = 0, rst = 1, tclk = 0;
  logic event_valid, parity_err;
  logic [7:0] event_code;
  int checks = 0, failures = 0, n_par = 0, lat_max = 0;
  logic [7:0] sent [$];
  realtime t_end;

  tclk_decoder dut (.*);
  always #5ns clk = ~clk;

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_cell(input logic b);
    realtime j;
    j = real'($urandom_range(0, 6000)) * 1ps - 3ns;
    tclk = ~tclk;
    if (b) begin
      #(CELL / 2 + j) tclk = ~tclk;
      #(CELL / 2 - j);
    end else
      #(CELL);
  endtask
  task automatic frame(input logic [7:0] code, input logic good);
    send_cell(0);
    for (int k = 0; k < 8; k++) send_cell(code[k]);
    send_cell(~^code ^ !good);
    t_end = $realtime;
  endtask

  always @(posedge clk) if (!rst) begin
    if (event_valid) begin
      int lat;
      lat = int'(($realtime - t_end) / 10ns);
      if (lat > lat_max) lat_max = lat;
      chk("event expected", sent.size() > 0);
      if (sent.size() > 0) begin
        chk($sformatf("event code %h exp %h", event_code, sent[0]), event_code == sent[0]);
        void'(sent.pop_front());
      end
    end
    if (parity_err) n_par++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    #($urandom_range(0, 9) * 1ns);
    repeat (7) send_cell(1);
    for (int e = 0; e < 60; e++) begin
      logic [7:0] c;
      c = (e == 0) ? 8'h00 : (e == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(c);
      frame(c, 1);
      repeat ($urandom_range(1, 5)) send_cell(1);
      if (e == 30) begin
        frame(8'h5A, 0);
        repeat (2) send_cell(1);
      end
      if (e == 40) begin
        #(CELL * 4);              // dead line
        repeat (3) send_cell(1);
      end
    end
    #(CELL * 3);
    chk("all events decoded", sent.size() == 0);
    chk("one parity error", n_par == 1);
    chk("event reported within 6 clocks of the parity cell", lat_max <= 6);
    $display("latency from end of parity cell: up to %0d clocks", lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
