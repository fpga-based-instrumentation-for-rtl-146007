// tb_cpu_bus_bridge: plays the microcontroller. With slow strobes (several
// clocks, asynchronous phase) it writes random words to random addresses
// through the byte protocol, reads them back and checks them, reads
// addresses it never wrote (whose content the memory model derives from the
// address), polls the busy bit, reads the link-check byte, and checks that
// the bus saw exactly the accesses the CPU asked for.
module tb_cpu_bus_bridge;
  import ap_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] cpu_d_in = '0, cpu_d_out;
  logic cpu_d_oe;
  logic [1:0] cpu_a = '0;
  logic cpu_rd = 0, cpu_wr = 0;
  int checks = 0, failures = 0;

  abus_if bus ();
  cpu_bus_bridge dut (.clk, .rst, .cpu_d_in, .cpu_d_out, .cpu_d_oe, .cpu_a, .cpu_rd, .cpu_wr, .m(bus));
  abus_mem_model #(.MAX_WAIT(4)) mem (.clk, .rst, .s(bus));
  always #5 clk = ~clk;

  task automatic pin_wr(input logic [1:0] a, input logic [7:0] d);
    #3 cpu_a = a; cpu_d_in = d;
    #7 cpu_wr = 1;
    #($urandom_range(40, 70)) cpu_wr = 0;
    #($urandom_range(40, 70));
  endtask
  task automatic pin_rd(input logic [1:0] a, output logic [7:0] d);
    #3 cpu_a = a;
    #7 cpu_rd = 1;
    #($urandom_range(40, 70));
    if (!cpu_d_oe) begin failures++; $display("FAIL data pins not driven during read"); end
    d = cpu_d_out;
    cpu_rd = 0;
    #($urandom_range(40, 70));
  endtask
  task automatic wait_idle();
    logic [7:0] st;
    do pin_rd(2'd2, st); while (st[0]);
  endtask
  task automatic bus_write(input addr_t a, input data_t v);
    pin_wr(0, a[15:8]); pin_wr(0, a[7:0]);
    for (int b = 3; b >= 0; b--) pin_wr(1, v[8*b +: 8]);
    pin_wr(2, 8'd2);
    wait_idle();
  endtask
  task automatic bus_read(input addr_t a, output data_t v);
    logic [7:0] b8;
    pin_wr(0, a[15:8]); pin_wr(0, a[7:0]);
    pin_wr(2, 8'd1);
    wait_idle();
    for (int b = 3; b >= 0; b--) begin pin_rd(1, b8); v[8*b +: 8] = b8; end
  endtask

  initial begin
    addr_t a [8];
    data_t v [8], r;
    logic [7:0] id;
    repeat (3) @(posedge clk);
    rst = 0;
    pin_rd(3, id);
    checks++;
    if (id != 8'hA5) begin failures++; $display("FAIL link byte %h", id); end
    for (int k = 0; k < 8; k++) begin
      a[k] = 16'($urandom); v[k] = $urandom;
      if (k == 0) begin a[k] = 16'h0459; v[k] = 32'h0000_fab4; end
      bus_write(a[k], v[k]);
    end
    for (int k = 0; k < 8; k++) begin
      bus_read(a[k], r);
      checks++;
      if (r != v[k]) begin failures++; $display("FAIL read %h = %h exp %h", a[k], r, v[k]); end
    end
    for (int k = 0; k < 4; k++) begin
      addr_t x;
      x = 16'h1000 + 16'(k * 64);
      bus_read(x, r);
      checks++;
      if (r != mem.peek(x)) begin failures++; $display("FAIL read %h = %h", x, r); end
    end
    checks++;
    if (mem.n_writes != 8 || mem.n_reads != 12) begin
      failures++; $display("FAIL bus saw %0d writes %0d reads", mem.n_writes, mem.n_reads);
    end
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
