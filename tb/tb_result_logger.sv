// tb_result_logger: drives the logger with BPM-style result events and plays
// an SDRAM port that acks after a random wait, keeping every written word in
// an associative array. Checks that each accepted record lands at
// consecutive addresses in order, that the pointer advances and wraps at the
// top of the 24-bit space, that events while busy or disabled write nothing
// (busy ones counting as missed), and that req is held until ack.
module tb_result_logger;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic enable = 0, load = 0, event_in = 0, req, ack = 0, busy;
  logic [23:0] load_ptr = '0, addr, ptr;
  logic [N-1:0][15:0] words = '0;
  logic [15:0] wdata;
  logic [7:0] missed;
  int checks = 0, failures = 0, n_wr = 0;
  logic [15:0] mem [logic [23:0]];

  result_logger #(.N_WORDS(N)) dut (.*);
  always #5 clk = ~clk;

  // SDRAM port: ack after 2..9 clocks of a request
  initial forever begin
    @(negedge clk);
    ack = 0;
    if (req) begin
      repeat ($urandom_range(1, 8)) @(negedge clk);
      ack = 1;
    end
  end
  always @(posedge clk) if (!rst && req && ack) begin
    mem[addr] = wdata;
    n_wr++;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fire(input logic [N-1:0][15:0] w);
    @(negedge clk);
    words = w; event_in = 1;
    @(negedge clk);
    event_in = 0; words = '0;
  endtask

  initial begin
    logic [N-1:0][15:0] w;
    logic [23:0] p0;
    repeat (3) @(negedge clk);
    rst = 0;
    // disabled: nothing written
    fire('1);
    repeat (20) @(negedge clk);
    chk("nothing written while disabled", n_wr == 0 && !busy);
    // start near the top so the pointer wraps
    load_ptr = 24'hFF_FFF6; load = 1;
    @(negedge clk) load = 0;
    enable = 1;
    for (int e = 0; e < 6; e++) begin
      p0 = ptr;
      for (int k = 0; k < N; k++) w[k] = 16'($urandom);
      fire(w);
      if (e == 2) begin
        // a second event while the record is being written
        fire(~w);
        chk("busy event counted as missed", missed == 8'd1);
      end
      wait (!busy);
      for (int k = 0; k < N; k++)
        chk($sformatf("record %0d word %0d", e, k), mem.exists(p0 + 24'(k)) && mem[p0 + 24'(k)] == w[k]);
      chk($sformatf("pointer after record %0d", e), ptr == p0 + 24'(N));
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    chk("pointer wrapped", ptr == 24'hFF_FFF6 + 24'(6 * N));
    chk("word count", n_wr == 6 * N);
    chk("missed count", missed == 8'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
