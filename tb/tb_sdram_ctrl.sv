// tb_sdram_ctrl: the controller drives a behavioural SDRAM that checks the
// power-up sequence and command timing. The bench writes random words to
// random addresses in all banks, reads them back (and some never-written
// words, whose content the model derives from the address), with refreshes
// falling between accesses. Checks: every read returns the expected word,
// rvalid follows ack by T_RCD + CAS + 2 clocks, refreshes happen, and the
// model saw no timing violation.
module tb_sdram_ctrl;
  localparam int T_RCD = 2, CAS = 2;
  logic clk = 0, rst = 1;
  logic req = 0, we = 0, ack, rvalid, ready;
  logic [23:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_a;
  logic [15:0] sd_dq_out, sd_dq_in;
  int checks = 0, failures = 0, cycle = 0;

  sdram_ctrl #(.T_INIT(60), .T_REFI(120), .T_RCD(T_RCD), .CAS(CAS)) dut (.*);
  sdram_model #(.CAS(CAS), .T_RCD(T_RCD), .MAX_REF_GAP(130)) sdram (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in)
  );
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic access(input logic w, input logic [23:0] a, input logic [15:0] d, output logic [15:0] r);
    int t_ack;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(posedge clk iff ack);
    t_ack = cycle;
    @(negedge clk) req = 0;
    if (!w) begin
      @(posedge clk iff rvalid);
      checks++;
      if (cycle - t_ack != T_RCD + CAS + 2) begin failures++; $display("FAIL read latency %0d", cycle - t_ack); end
      r = rdata;
    end
  endtask

  initial begin
    logic [23:0] a [64];
    logic [15:0] v [64], r;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (ready);
    for (int k = 0; k < 64; k++) begin
      a[k] = 24'($urandom);
      a[k][23:22] = 2'(k);
      v[k] = 16'($urandom);
      access(1, a[k], v[k], r);
      if (k % 7 == 0) repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    for (int k = 63; k >= 0; k--) begin
      access(0, a[k], 16'h0, r);
      checks++;
      if (r != v[k]) begin failures++; $display("FAIL read %h = %h exp %h", a[k], r, v[k]); end
    end
    for (int k = 0; k < 8; k++) begin
      logic [23:0] x;
      x = 24'h80_0000 + 24'(k * 4099);
      access(0, x, 16'h0, r);
      checks++;
      if (r != 16'(32'(x) ^ 32'h5A5A)) begin failures++; $display("FAIL unwritten %h = %h", x, r); end
    end
    checks++;
    if (sdram.n_ref < 10) begin failures++; $display("FAIL only %0d refreshes", sdram.n_ref); end
    checks++;
    if (sdram.errors != 0) begin failures++; $display("FAIL %0d SDRAM rule violations", sdram.errors); end
    checks++;
    if (sdram.n_wr != 64 || sdram.n_rd != 72) begin failures++; $display("FAIL %0d writes %0d reads", sdram.n_wr, sdram.n_rd); end
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
