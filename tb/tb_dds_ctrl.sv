// tb_dds_ctrl: a behavioural model of the AD9953 serial port (shifting sdio
// on sclk rising edges while cs_n is low, loading the addressed register at
// io_update) receives the controller's writes. The bench checks the decoded
// register and value of every write from each source, the priority when all
// three sources ask at once (phase jump, then ramp, then host), sclk high and
// low times of SCLK_DIV clocks, and the length of a write: cs_n is low for
// 2 * 8 * (1 + bytes) * SCLK_DIV clocks.
module tb_dds_ctrl;
  import ap_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst = 1;
  logic jump_req = 0, ramp_req = 0, host_req = 0, jump_ack, ramp_ack, host_ack;
  logic [13:0] jump_pow = '0;
  logic [31:0] ramp_ftw = '0;
  dds_cmd_t host_cmd = '0;
  logic dds_sclk, dds_sdio, dds_cs_n, dds_io_update, busy;
  logic [15:0] n_writes;
  int checks = 0, failures = 0, cycle = 0;

  dds_ctrl #(.SCLK_DIV(D)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- AD9953 serial-port model ----
  logic [63:0] rx;
  int          nrx, cs_t0, hi_t, lo_t;
  logic        sclk_d = 0;
  logic [7:0]  log_reg [$];
  logic [31:0] log_val [$];
  int          log_len [$];
  logic [31:0] pend_val;
  logic [7:0]  pend_reg;
  logic        cs_d = 1, upd_d = 0;
  always @(posedge clk) begin
    sclk_d <= dds_sclk;
    cs_d   <= dds_cs_n;
    upd_d  <= dds_io_update;
    if (!rst) begin
      if (!dds_cs_n && cs_d) begin nrx = 0; rx = '0; cs_t0 = cycle; end
      if (!dds_cs_n && dds_sclk && !sclk_d) begin rx = {rx[62:0], dds_sdio}; nrx++; end
      if (dds_sclk != sclk_d) begin
        if (sclk_d) begin
          checks++;
          if (cycle - hi_t != D) begin failures++; $display("FAIL sclk high %0d", cycle - hi_t); end
        end
        hi_t = cycle;
      end
      if (dds_cs_n && !cs_d) begin
        pend_reg = 8'(rx >> (nrx - 8));
        pend_val = 32'(rx & ((64'd1 << (nrx - 8)) - 1));
        log_len.push_back(cycle - cs_t0);
      end
      if (dds_io_update && !upd_d) begin
        log_reg.push_back(pend_reg);
        log_val.push_back(pend_val);
      end
    end
  end

  task automatic expect_write(input logic [7:0] r, input logic [31:0] v, input int nbytes);
    logic [7:0] gr; logic [31:0] gv; int gl;
    wait (log_reg.size() > 0);
    gr = log_reg.pop_front(); gv = log_val.pop_front(); gl = log_len.pop_front();
    checks++;
    if (gr != r || gv != v) begin failures++; $display("FAIL write reg %h val %h, exp reg %h val %h", gr, gv, r, v); end
    checks++;
    if (gl != 2 * 8 * (1 + nbytes) * D) begin failures++; $display("FAIL cs_n low %0d clocks", gl); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // all three at once: jump first, then ramp, then host
    @(negedge clk);
    jump_pow = 14'h2ABC; jump_req = 1;
    ramp_ftw = 32'h4A3D_70A4; ramp_req = 1;
    host_cmd = '{reg_addr: DDS_REG_ASF, data: {2'b00, 14'h1FFF, 16'h0}, nbytes: 3'd2}; host_req = 1;
    fork
      begin @(posedge clk iff jump_ack); @(negedge clk) jump_req = 0; end
      begin @(posedge clk iff ramp_ack); @(negedge clk) ramp_req = 0; end
      begin @(posedge clk iff host_ack); @(negedge clk) host_req = 0; end
      begin
        expect_write({3'b000, DDS_REG_POW0}, 32'h2ABC, 2);
        expect_write({3'b000, DDS_REG_FTW0}, 32'h4A3D_70A4, 4);
        expect_write({3'b000, DDS_REG_ASF}, 32'h1FFF, 2);
      end
    join
    // random host writes
    for (int k = 0; k < 10; k++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      host_cmd = '{reg_addr: DDS_REG_FTW0, data: v, nbytes: 3'd4}; host_req = 1;
      @(posedge clk iff host_ack);
      @(negedge clk) host_req = 0;
      expect_write({3'b000, DDS_REG_FTW0}, v, 4);
    end
    wait (!busy);
    checks++;
    if (n_writes != 13) begin failures++; $display("FAIL n_writes %0d", n_writes); end
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
