// ap_fpga_top: FPGA of the antiproton-source instrument boards.
//
// The boards are NIM modules built around one FPGA, a small microcontroller
// and commodity converters. Inside the FPGA everything the outside world may
// see or set lives on an A16/D32 register bus, reached from the
// microcontroller's pin port (cpu_bus_bridge) or from a neighbouring module
// over the crate's LVDS pairs (lvds_bus_slave); abus_arbiter shares it and
// abus_decoder holds the register map. lvds_bus_master lets this module act
// for the whole crate.
//
// Two application personalities are carried side by side, each with its own
// pins; a given board connects those of its own converters:
//  * BPM downconverter: four plates (two BPMs) of demodulated I/Q samples from
//    10-bit ADCs go through pedestal subtraction, magnitude and integration
//    over the 1.6 us bunch train (bpm_processor).
//  * RF DDS: two RF inputs sampled at 4/7 of 53 MHz are phase-measured
//    (phase_meter); the first (MI reference) feeds the phase jump, which like
//    the frequency ramp and host writes loads the AD9953 DDS (dds_ctrl); the
//    diagnostic DAC is driven by an orbit-synchronized waveform RAM (awg).
// Common to both, a front-panel trigger starts acquisition after the delay in
// register 0x0459 (trigger_delay), the same start opens the BPM integration
// window and records 256 samples of a selected channel (capture_buffer), and
// trig_out repeats the start for an oscilloscope. The board's 16M x 16
// SDRAM is reachable word by word through a pointer register (sdram_ctrl),
// and can keep a log of the four plate sums of every BPM acquisition
// (result_logger).
//
// The accelerator's clock-event line is decoded (tclk_decoder); a chosen
// event can start acquisition like the front-panel trigger, through the same
// delay.
//
// One clock: the 53.1 MHz board clock, shared by the crate over LVDS. ADC
// data arrive as parallel words with a one-clock valid strobe; trig_in,
// jump_trig and orbit_sync are asynchronous. Reset is synchronous, active
// high. The split into blocks follows the design description; the register
// map, the pin protocols and the single-clock scheme are this design's own.
module ap_fpga_top
  import ap_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // microcontroller port
  input  logic [7:0]        cpu_d_in,
  output logic [7:0]        cpu_d_out,
  output logic              cpu_d_oe,
  input  logic [1:0]        cpu_a,
  input  logic              cpu_rd,
  input  logic              cpu_wr,
  // inter-module LVDS bus
  input  logic [SLOT_W-1:0] slot_id,
  input  logic              lvds_sync_in,
  input  logic              lvds_sdat_in,
  input  logic              lvds_spare_in,
  output logic              lvds_sync_out,
  output logic              lvds_sdat_out,
  output logic              lvds_cmd_oe,
  output logic              lvds_spare_out,
  output logic              lvds_spare_oe,
  // front-panel timing
  input  logic              trig_in,
  input  logic              tclk,        // accelerator clock-event line
  output logic              trig_out,
  input  logic              jump_trig,
  input  logic              orbit_sync,
  // BPM downconverter ADCs (plates 0A, 0B, 1A, 1B)
  input  logic [9:0]        bpm_i [N_PLATES],
  input  logic [9:0]        bpm_q [N_PLATES],
  input  logic              bpm_valid,
  // RF phase-meter ADC (two channels)
  input  logic signed [11:0] rf_adc_a,
  input  logic signed [11:0] rf_adc_b,
  input  logic              rf_valid,
  input  logic              rf_sync,
  // AD9953 DDS serial port
  output logic              dds_sclk,
  output logic              dds_sdio,
  output logic              dds_cs_n,
  output logic              dds_io_update,
  // AD9751 diagnostic DAC
  output logic [9:0]        dac_data,
  // SDRAM (16M x 16)
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [1:0]        sd_ba,
  output logic [12:0]       sd_a,
  output logic [1:0]        sd_dqm,
  output logic [15:0]       sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [15:0]       sd_dq_in
);
  abus_if bus_cpu ();
  abus_if bus_lvds ();
  abus_if bus ();

  ctrl_t   ctrl;
  status_t stat;
  logic [9:0] ram_addr;
  logic    host_ack;

  // ---- bus masters, arbiter, register map ----
  cpu_bus_bridge u_cpu (
    .clk, .rst, .cpu_d_in, .cpu_d_out, .cpu_d_oe, .cpu_a, .cpu_rd, .cpu_wr, .m(bus_cpu)
  );
  lvds_bus_slave u_lvds_slave (
    .clk, .rst, .slot_id, .sync(lvds_sync_in), .sdat(lvds_sdat_in),
    .spare_out(lvds_spare_out), .spare_oe(lvds_spare_oe), .m(bus_lvds)
  );
  abus_arbiter u_arb (.clk, .rst, .m0(bus_cpu), .m1(bus_lvds), .s(bus));
  abus_decoder u_dec (.clk, .rst, .s(bus), .ctrl, .stat, .host_ack, .ram_addr);

  lvds_bus_master u_lvds_master (
    .clk, .rst, .go(ctrl.rem_go), .we(ctrl.rem_we),
    .slot(ctrl.rem_addr[SLOT_W+15:16]), .addr(ctrl.rem_addr[15:0]), .wdata(ctrl.rem_wdata),
    .rdata(stat.rem_rdata), .busy(stat.rem_busy), .err(stat.rem_err),
    .sync(lvds_sync_out), .sdat(lvds_sdat_out), .spare_in(lvds_spare_in)
  );
  assign lvds_cmd_oe = stat.rem_busy;

  // ---- acquisition start: delayed trigger or software ----
  logic trig_start, acq_start;
  // ---- accelerator clock events ----
  logic       tclk_valid, tclk_perr, tclk_trig;
  logic [7:0] tclk_code, tclk_last, tclk_nperr;
  logic [15:0] tclk_count;
  tclk_decoder u_tclk (
    .clk, .rst, .tclk, .event_valid(tclk_valid), .event_code(tclk_code), .parity_err(tclk_perr)
  );
  always_ff @(posedge clk) begin
    if (rst) begin
      tclk_trig  <= 1'b0;
      tclk_last  <= '0;
      tclk_count <= '0;
      tclk_nperr <= '0;
    end else begin
      tclk_trig <= tclk_valid && ctrl.tclk_en && tclk_code == ctrl.tclk_code;
      if (tclk_valid) begin
        tclk_last  <= tclk_code;
        tclk_count <= tclk_count + 1'b1;
      end
      if (tclk_perr && tclk_nperr != '1) tclk_nperr <= tclk_nperr + 1'b1;
    end
  end

  assign stat.tclk_last  = tclk_last;
  assign stat.tclk_count = tclk_count;
  assign stat.tclk_perr  = tclk_nperr;

  trigger_delay u_tdly (
    .clk, .rst, .trig_in(trig_in || tclk_trig), .delay(ctrl.trig_delay), .start(trig_start), .counting(stat.trig_wait)
  );
  assign acq_start = trig_start || ctrl.sw_start;
  always_ff @(posedge clk) trig_out <= rst ? 1'b0 : acq_start;

  // ---- BPM processing ----
  logic [9:0]  ped_i [N_PLATES];
  logic [9:0]  ped_q [N_PLATES];
  logic [15:0] sums  [N_PLATES];
  for (genvar p = 0; p < N_PLATES; p++) begin : g_ped
    assign ped_i[p]       = ctrl.ped_i[p];
    assign ped_q[p]       = ctrl.ped_q[p];
    assign stat.sums[p]   = sums[p];
  end
  bpm_processor #(.N_PLATES(N_PLATES)) u_bpm (
    .clk, .rst, .i_in(bpm_i), .q_in(bpm_q), .valid(bpm_valid),
    .ped_i, .ped_q, .start(acq_start), .sums, .done(stat.bpm_done)
  );

  // ---- capture RAM ----
  logic [31:0] cap_din;
  logic        cap_valid;
  always_comb begin
    cap_din   = '0;
    cap_valid = 1'b0;
    unique case (ctrl.cap_sel)
      3'd0, 3'd1, 3'd2, 3'd3: begin
        cap_din   = {6'd0, bpm_q[ctrl.cap_sel[1:0]], 6'd0, bpm_i[ctrl.cap_sel[1:0]]};
        cap_valid = bpm_valid;
      end
      3'd4: begin cap_din = 32'(rf_adc_a); cap_valid = rf_valid; end
      3'd5: begin cap_din = 32'(rf_adc_b); cap_valid = rf_valid; end
      default: ;
    endcase
  end
  capture_buffer #(.DEPTH(256), .W(32)) u_cap (
    .clk, .rst, .start(acq_start), .din(cap_din), .din_valid(cap_valid),
    .rd_addr(ram_addr[7:0]), .rd_data(stat.cap_rdata), .capturing(stat.cap_busy), .done(stat.cap_done)
  );

  // ---- RF phase measurement ----
  logic [15:0] phase_a;
  logic        phase_a_vld, phase_ok;
  logic signed [16:0] ia, qa, ib, qb;
  phase_meter u_phase_mi (
    .clk, .rst, .adc(rf_adc_a), .valid(rf_valid), .sync(rf_sync),
    .phase(phase_a), .phase_valid(phase_a_vld), .i_sum(ia), .q_sum(qa)
  );
  phase_meter u_phase_fb (
    .clk, .rst, .adc(rf_adc_b), .valid(rf_valid), .sync(rf_sync),
    .phase(stat.phase_fb), .phase_valid(), .i_sum(ib), .q_sum(qb)
  );
  always_ff @(posedge clk) phase_ok <= rst ? 1'b0 : (phase_ok || phase_a_vld);
  assign stat.phase    = phase_a;
  assign stat.phase_ok = phase_ok;
  assign stat.iq_mi    = {qa[16:1], ia[16:1]};
  assign stat.iq_fb    = {qb[16:1], ib[16:1]};

  // ---- phase jump, frequency ramp, DDS port ----
  logic        jump_req, jump_ack, jumped;
  logic [13:0] jump_pow;
  phase_jump u_jump (
    .clk, .rst, .jump_trig, .mi_phase(phase_a), .mi_phase_valid(phase_a_vld),
    .offset(ctrl.jump_ofs), .req(jump_req), .pow(jump_pow), .ack(jump_ack),
    .jump_phase(stat.jump_phase), .jumped, .missed(stat.jump_missed)
  );

  logic ramp_req, ramp_ack;
  freq_ramp u_ramp (
    .clk, .rst, .go(ctrl.ramp_go), .ftw_start(ctrl.ramp_start), .ftw_end(ctrl.ramp_end),
    .ftw_step(ctrl.ramp_step), .interval(ctrl.ramp_ival), .ftw(stat.ramp_ftw),
    .req(ramp_req), .ack(ramp_ack), .busy(stat.ramp_busy)
  );

  dds_ctrl u_dds (
    .clk, .rst,
    .jump_req, .jump_pow, .jump_ack,
    .ramp_req, .ramp_ftw(stat.ramp_ftw), .ramp_ack,
    .host_req(ctrl.host_req), .host_cmd(ctrl.host_cmd), .host_ack,
    .dds_sclk, .dds_sdio, .dds_cs_n, .dds_io_update, .busy(stat.dds_busy), .n_writes(stat.dds_writes)
  );

  // ---- arbitrary waveform generator ----
  awg #(.DEPTH(1024), .DAC_W(10)) u_awg (
    .clk, .rst, .orbit_sync, .length(ctrl.awg_len), .wr_en(ctrl.awg_we),
    .wr_addr(ctrl.awg_waddr), .wr_data(ctrl.awg_wdata), .rd_addr(ram_addr), .rd_data(stat.awg_rdata),
    .dac_data, .playing(stat.awg_playing), .n_orbits(stat.orbits)
  );

  // ---- SDRAM, one word at a time from the register bus ----
  // the result logger goes first; the host's request waits meanwhile
  logic        sd_rvalid, sd_rd_pend, sd_ack, log_req;
  logic [15:0] sd_rdata, sd_last, log_wdata;
  logic [23:0] log_addr;
  logic [N_PLATES-1:0][15:0] log_words;
  logic        bpm_done_q, bpm_done_rise;
  always_ff @(posedge clk) bpm_done_q <= rst ? 1'b0 : stat.bpm_done;
  assign bpm_done_rise = stat.bpm_done && !bpm_done_q;
  always_comb for (int p = 0; p < N_PLATES; p++) log_words[p] = sums[p];
  result_logger #(.N_WORDS(N_PLATES), .W(16), .AW(24)) u_logger (
    .clk, .rst, .enable(ctrl.log_en), .load(ctrl.log_load), .load_ptr(ctrl.log_base),
    .event_in(bpm_done_rise), .words(log_words), .req(log_req), .addr(log_addr), .wdata(log_wdata),
    .ack(sd_ack && log_req), .busy(stat.log_busy), .ptr(stat.log_ptr), .missed(stat.log_missed)
  );
  assign stat.sd_ack = sd_ack && !log_req;
  sdram_ctrl u_sdram (
    .clk, .rst, .req(log_req || ctrl.sd_req), .we(log_req || ctrl.sd_we),
    .addr(log_req ? log_addr : ctrl.sd_ptr), .wdata(log_req ? log_wdata : ctrl.sd_wdata),
    .ack(sd_ack), .rdata(sd_rdata), .rvalid(sd_rvalid), .ready(stat.sd_ready),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );
  always_ff @(posedge clk) begin
    if (rst) begin
      sd_rd_pend     <= 1'b0;
      sd_last        <= '0;
    end else begin
      if (stat.sd_ack && !ctrl.sd_we) sd_rd_pend <= 1'b1;
      if (sd_rvalid) begin
        sd_rd_pend    <= 1'b0;
        sd_last       <= sd_rdata;
      end
    end
  end
  assign stat.sd_busy  = ctrl.sd_req || sd_rd_pend;
  assign stat.sd_rdata = sd_last;
endmodule
