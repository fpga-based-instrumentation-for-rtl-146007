// tb_lvds_bus_slave: drives command frames onto the crate bus pairs
// (sync with the first bit, then we, slot, address, data) and collects the
// reply from the spare pair. Checks: frames for this slot are executed on the
// internal bus (writes land in memory, reads return the word in the reply),
// frames for other slots are ignored and produce no reply, the reply starts
// with a 1 and carries 32 bits, and spare is driven only while replying.
module tb_lvds_bus_slave;
  import ap_pkg::*;
  logic clk = 0, rst = 1, sync = 0, sdat = 0, spare_out, spare_oe;
  logic [SLOT_W-1:0] slot_id = 4'd5;
  int checks = 0, failures = 0;

  abus_if bus ();
  lvds_bus_slave dut (.clk, .rst, .slot_id, .sync, .sdat, .spare_out, .spare_oe, .m(bus));
  abus_mem_model #(.MAX_WAIT(3)) mem (.clk, .rst, .s(bus));
  always #5 clk = ~clk;

  task automatic send(input logic we, input logic [3:0] slot, input addr_t a, input data_t d);
    logic [FRAME_W-1:0] f;
    f = {we, slot, a, d};
    for (int b = FRAME_W - 1; b >= 0; b--) begin
      @(negedge clk);
      sync = (b == FRAME_W - 1);
      sdat = f[b];
    end
    @(negedge clk) begin sync = 0; sdat = 0; end
  endtask

  // waits for the reply; returns 0 if none came within limit clocks
  task automatic reply(output bit got, output data_t d, input int limit);
    int n = 0;
    got = 0;
    while (n < limit && !(spare_oe && spare_out)) begin @(negedge clk); n++; end
    if (n >= limit) return;
    got = 1;
    for (int b = 31; b >= 0; b--) begin
      @(negedge clk);
      if (!spare_oe) begin failures++; $display("FAIL spare released early"); end
      d[b] = spare_out;
    end
    @(negedge clk);
    checks++;
    if (spare_oe) begin failures++; $display("FAIL spare still driven"); end
  endtask

  initial begin
    addr_t a [6];
    data_t v [6], r;
    bit got;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 6; k++) begin
      a[k] = 16'($urandom); v[k] = $urandom;
      send(1, slot_id, a[k], v[k]);
      reply(got, r, 60);
      checks++;
      if (!got || r != v[k]) begin failures++; $display("FAIL write reply %0d %h", got, r); end
    end
    for (int k = 0; k < 6; k++) begin
      send(0, slot_id, a[k], 32'h0);
      reply(got, r, 60);
      checks++;
      if (!got || r != v[k]) begin failures++; $display("FAIL read %h: %0d %h exp %h", a[k], got, r, v[k]); end
    end
    // another slot: nothing happens
    send(1, 4'd6, a[0], 32'h1111_2222);
    reply(got, r, 80);
    checks++;
    if (got) begin failures++; $display("FAIL reply for another slot"); end
    send(0, slot_id, a[0], 32'h0);
    reply(got, r, 60);
    checks++;
    if (!got || r != v[0]) begin failures++; $display("FAIL other-slot write landed: %h", r); end
    checks++;
    if (mem.n_writes != 6 || mem.n_reads != 7) begin failures++; $display("FAIL bus count %0d %0d", mem.n_writes, mem.n_reads); end
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
