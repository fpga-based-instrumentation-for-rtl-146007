// tb_abus_decoder: exercises the register map through a behavioural bus
// master. Checks the identification word, write/read-back of the trigger
// delay at 0x0459 and of the pedestals, that results and status fields show
// at their addresses, that the capture and waveform windows reach the RAM
// ports, that action registers give one-clock pulses or queued DDS commands
// (cleared by host_ack), that SDRAM accesses are queued until acked and then
// advance the SDRAM pointer, that unmapped addresses read 0, and that every
// access completes in 2 clocks (request to ack).
module tb_abus_decoder;
  import ap_pkg::*;
  logic clk = 0, rst = 1, host_ack = 0;
  ctrl_t ctrl;
  status_t stat;
  logic [9:0] ram_addr;
  int checks = 0, failures = 0;
  int n_ramp_go = 0, n_sw = 0, n_awg_we = 0, n_rem = 0;

  abus_if bus ();
  abus_decoder dut (.clk, .rst, .s(bus), .ctrl, .stat, .host_ack, .ram_addr);
  abus_master_model mm (.clk, .m(bus));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && ctrl.ramp_go) n_ramp_go++;
    if (!rst && ctrl.sw_start) n_sw++;
    if (!rst && ctrl.awg_we) n_awg_we++;
    if (!rst && ctrl.rem_go) n_rem++;
    // RAM models: word = function of address, one clock of latency
    stat.cap_rdata <= {22'h2AAAA, ram_addr} ^ 32'h1234_5678;
    stat.awg_rdata <= ~ram_addr;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic wr(input addr_t a, input data_t v);
    int c;
    mm.write(a, v, c);
    chk("write latency", 32'(c), 32'd2);
  endtask
  task automatic rd(input addr_t a, output data_t v);
    int c;
    mm.read(a, v, c);
    chk("read latency", 32'(c), 32'd2);
  endtask

  initial begin
    data_t r;
    stat = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    stat.sums[2] = 16'hBEEF; stat.phase = 16'h4321; stat.cap_done = 1; stat.dds_busy = 1;
    stat.ramp_ftw = 32'h0BAD_F00D;
    rd(A_ID, r);             chk("id", r, ID_WORD);
    wr(A_TRIG_DELAY, 32'h0000_fab4);
    rd(16'h0459, r);         chk("trigger delay", r, 32'h0000_fab4);
    chk("trigger delay out", ctrl.trig_delay, 32'h0000_fab4);
    wr(A_PED0 + 1, {6'd0, 10'd300, 6'd0, 10'd517});
    chk("ped i", 32'(ctrl.ped_i[1]), 32'd517);
    chk("ped q", 32'(ctrl.ped_q[1]), 32'd300);
    rd(A_PED0 + 1, r);       chk("ped readback", r, {6'd0, 10'd300, 6'd0, 10'd517});
    rd(A_SUM0 + 2, r);       chk("sum", r, 32'h0000_BEEF);
    rd(A_PHASE, r);          chk("phase", r, 32'h4321);
    rd(A_STATUS, r);         chk("status", r, 32'b1_0001);
    rd(A_RAMP_FTW, r);       chk("ramp ftw", r, 32'h0BAD_F00D);
    rd(16'h1040, r);         chk("capture word", r, {22'h2AAAA, 10'h040} ^ 32'h1234_5678);
    rd(16'h10FF, r);         chk("capture word", r, {22'h2AAAA, 10'h0FF} ^ 32'h1234_5678);
    rd(16'h0805, r);         chk("awg word", r, {22'd0, ~10'h005});
    wr(16'h0A07, 32'h0000_0155);
    @(negedge clk);
    chk("awg write pulse", n_awg_we, 1);
    chk("awg write data", 32'(ctrl.awg_wdata), 32'h155);
    chk("awg write address", 32'(ctrl.awg_waddr), 32'h207);
    wr(A_CTRL, 32'b1011);
    @(negedge clk);
    chk("sw start pulse", n_sw, 1);
    chk("capture select", 32'(ctrl.cap_sel), 32'd5);
    wr(A_RAMP_GO, 32'd1);
    @(negedge clk);
    chk("ramp go pulse", n_ramp_go, 1);
    wr(A_DDS_FTW, 32'h1357_9BDF);
    chk("host req", 32'(ctrl.host_req), 1);
    chk("host reg", 32'(ctrl.host_cmd.reg_addr), 32'(DDS_REG_FTW0));
    chk("host data", ctrl.host_cmd.data, 32'h1357_9BDF);
    chk("host bytes", 32'(ctrl.host_cmd.nbytes), 4);
    @(negedge clk) host_ack = 1;
    @(negedge clk) host_ack = 0;
    chk("host req cleared", 32'(ctrl.host_req), 0);
    wr(A_DDS_POW, 32'h0000_3FFF);
    chk("pow cmd", ctrl.host_cmd.data, {2'b00, 14'h3FFF, 16'h0});
    wr(A_REM_ADDR, 32'h0005_0459);
    wr(A_REM_CMD, 32'd2);
    @(negedge clk);
    chk("remote go", n_rem, 1);
    chk("remote we", 32'(ctrl.rem_we), 1);
    chk("remote addr", 32'(ctrl.rem_addr), 32'h5_0459);
    wr(A_SD_ADDR, 32'h00AB_CDEF);
    wr(A_SD_DATA, 32'h0000_4242);
    chk("sdram req", 32'(ctrl.sd_req), 1);
    chk("sdram we", 32'(ctrl.sd_we), 1);
    chk("sdram data", 32'(ctrl.sd_wdata), 32'h4242);
    @(negedge clk) stat.sd_ack = 1;
    @(negedge clk) stat.sd_ack = 0;
    chk("sdram req cleared", 32'(ctrl.sd_req), 0);
    rd(A_SD_ADDR, r);        chk("sdram pointer advanced", r, 32'h00AB_CDF0);
    wr(A_SD_CMD, 32'h1);
    chk("sdram read req", 32'({ctrl.sd_req, ctrl.sd_we}), 2);
    stat.sd_ready = 1; stat.sd_busy = 1;
    rd(A_SD_CMD, r);         chk("sdram status", r, 3);
    wr(A_SD_LOG, 32'h8012_3456);
    chk("log enable", 32'(ctrl.log_en), 1);
    chk("log base", 32'(ctrl.log_base), 32'h12_3456);
    stat.log_ptr = 24'h00_0042; stat.log_missed = 8'd3; stat.log_busy = 1;
    rd(A_SD_LOG, r);         chk("log readback", r, 32'h8000_0042);
    rd(A_SD_LOGSTAT, r);     chk("log status", r, 32'h103);
    wr(A_TCLK_TRIG, 32'h8000_00A7);
    chk("clock event select", 32'({ctrl.tclk_en, ctrl.tclk_code}), 32'h1A7);
    stat.tclk_count = 16'd9; stat.tclk_perr = 8'd2; stat.tclk_last = 8'h33;
    rd(A_TCLK_STAT, r);      chk("clock event status", r, 32'h0009_0233);
    rd(16'h7777, r);         chk("unmapped", r, 0);
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
