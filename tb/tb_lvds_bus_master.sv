// tb_lvds_bus_master: a behavioural crate neighbour decodes the frames the
// master puts on sync/sdat, checks them against the requested access, keeps
// a memory, and answers on the spare line after a random delay. Checks:
// frame contents and framing, read data returned, busy during the access,
// and a timeout error when the addressed slot (here 15) never answers.
module tb_lvds_bus_master;
  import ap_pkg::*;
  logic clk = 0, rst = 1, go = 0, we = 0, busy, err, sync, sdat, spare_in = 0;
  logic [SLOT_W-1:0] slot = '0;
  addr_t addr = '0;
  data_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  data_t mem [addr_t];
  lvds_frame_t last;

  lvds_bus_master #(.TIMEOUT(100)) dut (.*);
  always #5 clk = ~clk;

  // neighbour module
  initial begin
    forever begin
      logic [FRAME_W-1:0] f;
      data_t d;
      @(posedge clk iff sync);
      f[FRAME_W-1] = sdat;
      for (int b = FRAME_W - 2; b >= 0; b--) begin
        @(posedge clk);
        if (sync) begin failures++; $display("FAIL sync inside frame"); end
        f[b] = sdat;
      end
      last = lvds_frame_t'(f);
      if (last.slot != 4'd15) begin
        if (last.we) mem[last.addr] = last.data;
        d = last.we ? last.data : (mem.exists(last.addr) ? mem[last.addr] : 32'h0);
        repeat ($urandom_range(2, 20)) @(negedge clk);
        spare_in = 1;
        for (int b = 31; b >= 0; b--) begin @(negedge clk); spare_in = d[b]; end
        @(negedge clk) spare_in = 0;
      end
    end
  end

  task automatic access(input logic w, input logic [3:0] s, input addr_t a, input data_t v);
    @(negedge clk);
    we = w; slot = s; addr = a; wdata = v; go = 1;
    @(negedge clk) go = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    while (busy) @(negedge clk);
    checks++;
    if (last.we != w || last.slot != s || last.addr != a || (w && last.data != v)) begin
      failures++; $display("FAIL frame %p", last);
    end
  endtask

  initial begin
    addr_t a [5];
    data_t v [5];
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 5; k++) begin
      a[k] = 16'($urandom); v[k] = $urandom;
      access(1, 4'(k + 1), a[k], v[k]);
      checks++;
      if (err || rdata != v[k]) begin failures++; $display("FAIL write echo %h", rdata); end
    end
    for (int k = 0; k < 5; k++) begin
      access(0, 4'(k + 1), a[k], 32'h0);
      checks++;
      if (err || rdata != v[k]) begin failures++; $display("FAIL read %h exp %h", rdata, v[k]); end
    end
    access(0, 4'd15, 16'h0459, 32'h0);
    checks++;
    if (!err) begin failures++; $display("FAIL no timeout for a silent slot"); end
    access(0, 4'd1, a[0], 32'h0);
    checks++;
    if (err || rdata != v[0]) begin failures++; $display("FAIL error not cleared"); end
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
