// abus_decoder: address decoder, control registers and read multiplexer of
// the internal A16/D32 bus.
//
// Every register and memory of the board's FPGA appears at a word address
// (see ap_pkg for the map): the acquisition trigger delay at 0x0459, the
// 256-word capture RAM at 0x1000-0x10FF, the 1024-word waveform RAM at
// 0x0800-0x0BFF, and registers for the BPM pedestals and results, the RF
// phase, the phase jump, the frequency ramp, direct DDS writes and the
// inter-module bus master. Writes to a few addresses act rather than store:
// A_CTRL bit 0 and A_RAMP_GO give one-clock pulses, A_DDS_* queue a DDS
// write (held until the DDS controller takes it), A_REM_CMD starts a remote
// access, A_SD_DATA and A_SD_CMD queue an SDRAM write or read at the SDRAM
// pointer (held until the SDRAM controller takes it; the pointer then
// advances, so consecutive words need no pointer rewrite), and A_SD_LOG sets
// the BPM result log's pointer and enable. A_TCLK_TRIG selects the clock
// event that triggers acquisition.
//
// Timing: ack follows a request by one clock for every address, so RAM reads
// (synchronous, addressed straight from the bus) are ready in the ack cycle.
// Writes take effect in the ack cycle. Unmapped addresses read 0 and ignore
// writes. Only 0x0459 and the capture window follow the design description;
// the other addresses and the single wait state are this design's own.
module abus_decoder
  import ap_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  abus_if.slave   s,
  output ctrl_t   ctrl,
  input  status_t stat,
  input  logic    host_ack,
  output logic [9:0] ram_addr
);
  logic wr;
  assign wr = s.req && s.ack && s.we;

  always_ff @(posedge clk) begin
    if (rst) s.ack <= 1'b0;
    else     s.ack <= s.req && !s.ack;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0;
      ctrl.ramp_ival <= 16'd1;
    end else begin
      ctrl.sw_start <= 1'b0;
      ctrl.ramp_go  <= 1'b0;
      ctrl.awg_we   <= 1'b0;
      ctrl.rem_go   <= 1'b0;
      ctrl.log_load <= 1'b0;
      if (host_ack) ctrl.host_req <= 1'b0;
      if (stat.sd_ack) begin
        ctrl.sd_req <= 1'b0;
        ctrl.sd_ptr <= ctrl.sd_ptr + 1'b1;
      end
      if (wr) begin
        if (s.addr >= A_PED0 && s.addr < A_PED0 + 16'(N_PLATES)) begin
          ctrl.ped_i[s.addr[1:0]] <= s.wdata[9:0];
          ctrl.ped_q[s.addr[1:0]] <= s.wdata[25:16];
        end
        if (s.addr >= A_AWG_BASE && s.addr < A_AWG_BASE + 16'd1024) begin
          ctrl.awg_we    <= 1'b1;
          ctrl.awg_waddr <= s.addr[9:0];
          ctrl.awg_wdata <= s.wdata[9:0];
        end
        unique case (s.addr)
          A_CTRL: begin
            ctrl.sw_start <= s.wdata[0];
            ctrl.cap_sel  <= s.wdata[3:1];
          end
          A_TRIG_DELAY: ctrl.trig_delay <= s.wdata;
          A_JUMP_OFS:   ctrl.jump_ofs   <= s.wdata[15:0];
          A_RAMP_START: ctrl.ramp_start <= s.wdata;
          A_RAMP_END:   ctrl.ramp_end   <= s.wdata;
          A_RAMP_STEP:  ctrl.ramp_step  <= s.wdata;
          A_RAMP_IVAL:  ctrl.ramp_ival  <= s.wdata[15:0];
          A_RAMP_GO:    ctrl.ramp_go    <= 1'b1;
          A_DDS_FTW: begin
            ctrl.host_req <= 1'b1;
            ctrl.host_cmd <= '{reg_addr: DDS_REG_FTW0, data: s.wdata, nbytes: 3'd4};
          end
          A_DDS_POW: begin
            ctrl.host_req <= 1'b1;
            ctrl.host_cmd <= '{reg_addr: DDS_REG_POW0, data: {2'b00, s.wdata[13:0], 16'h0}, nbytes: 3'd2};
          end
          A_DDS_ASF: begin
            ctrl.host_req <= 1'b1;
            ctrl.host_cmd <= '{reg_addr: DDS_REG_ASF, data: {2'b00, s.wdata[13:0], 16'h0}, nbytes: 3'd2};
          end
          A_AWG_LEN:  ctrl.awg_len   <= s.wdata[10:0];
          A_REM_ADDR: ctrl.rem_addr  <= s.wdata[SLOT_W+15:0];
          A_REM_DATA: ctrl.rem_wdata <= s.wdata;
          A_REM_CMD: begin
            ctrl.rem_go <= (s.wdata[1:0] == 2'd1) || (s.wdata[1:0] == 2'd2);
            ctrl.rem_we <= (s.wdata[1:0] == 2'd2);
          end
          A_SD_ADDR: ctrl.sd_ptr <= s.wdata[23:0];
          A_SD_DATA: begin
            ctrl.sd_req   <= 1'b1;
            ctrl.sd_we    <= 1'b1;
            ctrl.sd_wdata <= s.wdata[15:0];
          end
          A_SD_CMD: begin
            ctrl.sd_req <= 1'b1;
            ctrl.sd_we  <= 1'b0;
          end
          A_TCLK_TRIG: begin
            ctrl.tclk_en   <= s.wdata[31];
            ctrl.tclk_code <= s.wdata[7:0];
          end
          A_SD_LOG: begin
            ctrl.log_en   <= s.wdata[31];
            ctrl.log_load <= 1'b1;
            ctrl.log_base <= s.wdata[23:0];
          end
          default: ;
        endcase
      end
    end
  end

  // RAM addresses come straight from the bus
  assign ram_addr = s.addr[9:0];

  always_comb begin
    s.rdata = '0;
    if (s.addr >= A_CAP_BASE && s.addr < A_CAP_BASE + 16'd256)
      s.rdata = stat.cap_rdata;
    else if (s.addr >= A_AWG_BASE && s.addr < A_AWG_BASE + 16'd1024)
      s.rdata = {22'd0, stat.awg_rdata};
    else if (s.addr >= A_PED0 && s.addr < A_PED0 + 16'(N_PLATES))
      s.rdata = {6'd0, ctrl.ped_q[s.addr[1:0]], 6'd0, ctrl.ped_i[s.addr[1:0]]};
    else if (s.addr >= A_SUM0 && s.addr < A_SUM0 + 16'(N_PLATES))
      s.rdata = {16'd0, stat.sums[s.addr[1:0]]};
    else unique case (s.addr)
      A_ID:         s.rdata = ID_WORD;
      A_CTRL:       s.rdata = {28'd0, ctrl.cap_sel, 1'b0};
      A_STATUS:     s.rdata = {21'd0, stat.awg_playing, stat.jump_missed, stat.cap_busy, stat.trig_wait,
                               stat.rem_err, stat.rem_busy, stat.dds_busy,
                               stat.phase_ok, stat.ramp_busy, stat.bpm_done, stat.cap_done};
      A_PHASE_FB:   s.rdata = {16'd0, stat.phase_fb};
      A_IQ_MI:      s.rdata = stat.iq_mi;
      A_IQ_FB:      s.rdata = stat.iq_fb;
      A_COUNTS:     s.rdata = {stat.orbits, stat.dds_writes};
      A_PHASE:      s.rdata = {16'd0, stat.phase};
      A_JUMP_OFS:   s.rdata = {16'd0, ctrl.jump_ofs};
      A_JUMP_POW:   s.rdata = {16'd0, stat.jump_phase};
      A_RAMP_START: s.rdata = ctrl.ramp_start;
      A_RAMP_END:   s.rdata = ctrl.ramp_end;
      A_RAMP_STEP:  s.rdata = ctrl.ramp_step;
      A_RAMP_IVAL:  s.rdata = {16'd0, ctrl.ramp_ival};
      A_RAMP_FTW:   s.rdata = stat.ramp_ftw;
      A_AWG_LEN:    s.rdata = {21'd0, ctrl.awg_len};
      A_REM_ADDR:   s.rdata = {{(16-SLOT_W){1'b0}}, ctrl.rem_addr};
      A_REM_DATA:   s.rdata = stat.rem_rdata;
      A_REM_CMD:    s.rdata = {30'd0, stat.rem_err, stat.rem_busy};
      A_SD_ADDR:    s.rdata = {8'd0, ctrl.sd_ptr};
      A_SD_DATA:    s.rdata = {16'd0, stat.sd_rdata};
      A_SD_CMD:     s.rdata = {30'd0, stat.sd_ready, stat.sd_busy};
      A_SD_LOG:     s.rdata = {ctrl.log_en, 7'd0, stat.log_ptr};
      A_SD_LOGSTAT: s.rdata = {23'd0, stat.log_busy, stat.log_missed};
      A_TCLK_TRIG:  s.rdata = {ctrl.tclk_en, 23'd0, ctrl.tclk_code};
      A_TCLK_STAT:  s.rdata = {stat.tclk_count, stat.tclk_perr, stat.tclk_last};
      A_TRIG_DELAY: s.rdata = ctrl.trig_delay;
      default:      s.rdata = '0;
    endcase
  end

  a_no_ack_without_req: assert property (@(posedge clk) disable iff (rst) s.ack |-> s.req);
endmodule
