// tb_ap_fpga_top: end-to-end run of the whole FPGA at its default sizes.
//
// The bench plays every device around the FPGA: the microcontroller on the
// pin port, a neighbouring module on the crate's LVDS pairs, the four BPM
// demodulator ADC channels, the two RF inputs sampled at 4/7 of the carrier,
// the AD9953 serial port and the front-panel timing signals. It then goes
// through a board's work: configure registers, take a triggered BPM
// acquisition (sums and capture RAM checked against independently computed
// values), measure RF phases, perform a phase jump and a frequency ramp and
// check what reaches the DDS, play an orbit-synchronized waveform, forward
// accesses to other modules of the crate, and take a software-started
// capture of the RF ADC, store and fetch a block of words in the SDRAM, and
// read back the BPM sums that the result log wrote there, and start an
// acquisition from a decoded accelerator clock event.
// Each mechanism is counted; one that never happened
// counts as a failure.
module tb_ap_fpga_top;
  import ap_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic [7:0] cpu_d_in = '0, cpu_d_out;
  logic cpu_d_oe;
  logic [1:0] cpu_a = '0;
  logic cpu_rd = 0, cpu_wr = 0;
  logic [SLOT_W-1:0] slot_id = 4'd3;
  logic tb_sync = 0, tb_sdat = 0, nb_spare = 0;
  logic lvds_sync_in, lvds_sdat_in, lvds_spare_in;
  logic lvds_sync_out, lvds_sdat_out, lvds_cmd_oe, lvds_spare_out, lvds_spare_oe;
  logic trig_in = 0, trig_out, jump_trig = 0, orbit_sync = 0, tclk = 0;
  logic [9:0] bpm_i [N_PLATES], bpm_q [N_PLATES];
  logic bpm_valid = 0;
  logic signed [11:0] rf_adc_a = '0, rf_adc_b = '0;
  logic rf_valid = 0, rf_sync = 0;
  logic dds_sclk, dds_sdio, dds_cs_n, dds_io_update;
  logic [9:0] dac_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_a;
  logic [15:0] sd_dq_out, sd_dq_in;

  ap_fpga_top dut (.*);
  sdram_model sdram (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in)
  );

  // the crate bus is wired-or of everyone driving it
  assign lvds_sync_in  = tb_sync | (lvds_cmd_oe & lvds_sync_out);
  assign lvds_sdat_in  = tb_sdat | (lvds_cmd_oe & lvds_sdat_out);
  assign lvds_spare_in = nb_spare | (lvds_spare_oe & lvds_spare_out);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_cpu = 0, n_lvds_in = 0, n_lvds_out = 0, n_timeout = 0, n_contention = 0;
  int n_trig = 0, n_sw = 0, n_bpm = 0, n_capture = 0, n_phase = 0, n_jump = 0;
  int t_jump;
  int n_jump_missed = 0, n_ramp = 0, n_host_dds = 0, n_orbit = 0, n_sdram = 0, n_log = 0, n_tclk = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.bus_cpu.req && dut.bus_lvds.req) n_contention++;
    if (dut.bus_cpu.req && dut.bus_cpu.ack) n_cpu++;
    if (dut.bus_lvds.req && dut.bus_lvds.ack) n_lvds_in++;
  end

  // ---- accelerator clock-event line: biphase mark, a cell is 5.3 clocks ----
  task automatic tclk_cell(input logic b);
    tclk = ~tclk;
    if (b) begin #27 tclk = ~tclk; #26; end
    else #53;
  endtask
  task automatic tclk_event(input logic [7:0] code);
    tclk_cell(0);
    for (int k = 0; k < 8; k++) tclk_cell(code[k]);
    tclk_cell(~^code);
    repeat (3) tclk_cell(1);
  endtask
  int n_trig_out = 0;
  always @(posedge clk) if (!rst && trig_out) n_trig_out++;

  // ---- microcontroller ----
  task automatic pin_wr(input logic [1:0] a, input logic [7:0] d);
    #3 cpu_a = a; cpu_d_in = d;
    #7 cpu_wr = 1;
    #40 cpu_wr = 0;
    #40;
  endtask
  task automatic pin_rd(input logic [1:0] a, output logic [7:0] d);
    #3 cpu_a = a;
    #7 cpu_rd = 1;
    #40 d = cpu_d_out;
    cpu_rd = 0;
    #40;
  endtask
  task automatic cpu_idle();
    logic [7:0] st;
    do pin_rd(2'd2, st); while (st[0]);
  endtask
  task automatic cpu_write(input addr_t a, input data_t v);
    pin_wr(0, a[15:8]); pin_wr(0, a[7:0]);
    for (int b = 3; b >= 0; b--) pin_wr(1, v[8*b +: 8]);
    pin_wr(2, 8'd2);
    cpu_idle();
  endtask
  task automatic cpu_read(input addr_t a, output data_t v);
    logic [7:0] b8;
    pin_wr(0, a[15:8]); pin_wr(0, a[7:0]);
    pin_wr(2, 8'd1);
    cpu_idle();
    for (int b = 3; b >= 0; b--) begin pin_rd(1, b8); v[8*b +: 8] = b8; end
  endtask

  // ---- a neighbouring module's master on the crate bus ----
  task automatic lvds_access(input logic we, input addr_t a, input data_t d, output data_t r);
    logic [FRAME_W-1:0] f;
    f = {we, slot_id, a, d};
    for (int b = FRAME_W - 1; b >= 0; b--) begin
      @(negedge clk);
      tb_sync = (b == FRAME_W - 1);
      tb_sdat = f[b];
    end
    @(negedge clk) begin tb_sync = 0; tb_sdat = 0; end
    while (!(lvds_spare_oe && lvds_spare_out)) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin @(negedge clk); r[b] = lvds_spare_out; end
  endtask

  // ---- neighbouring modules' slaves (slots 7 answers, 9 is silent) ----
  data_t nb_mem [addr_t];
  initial begin
    forever begin
      logic [FRAME_W-1:0] f;
      lvds_frame_t fr;
      data_t d;
      @(posedge clk iff (lvds_cmd_oe && lvds_sync_out));
      f[FRAME_W-1] = lvds_sdat_out;
      for (int b = FRAME_W - 2; b >= 0; b--) begin @(posedge clk); f[b] = lvds_sdat_out; end
      fr = lvds_frame_t'(f);
      if (fr.slot == 4'd7) begin
        n_lvds_out++;
        if (fr.we) nb_mem[fr.addr] = fr.data;
        d = fr.we ? fr.data : (nb_mem.exists(fr.addr) ? nb_mem[fr.addr] : 32'h0);
        repeat (5) @(negedge clk);
        nb_spare = 1;
        for (int b = 31; b >= 0; b--) begin @(negedge clk); nb_spare = d[b]; end
        @(negedge clk) nb_spare = 0;
      end
    end
  end

  // ---- AD9953 serial port ----
  logic [63:0] dds_rx;
  int dds_n;
  logic sclk_d = 0, cs_d = 1, upd_d = 0;
  logic [7:0] dds_reg [$];
  logic [31:0] dds_val [$];
  logic [7:0] pend_reg;
  logic [31:0] pend_val;
  always @(posedge clk) begin
    sclk_d <= dds_sclk; cs_d <= dds_cs_n; upd_d <= dds_io_update;
    if (!rst) begin
      if (!dds_cs_n && cs_d) begin dds_n = 0; dds_rx = '0; end
      if (!dds_cs_n && dds_sclk && !sclk_d) begin dds_rx = {dds_rx[62:0], dds_sdio}; dds_n++; end
      if (dds_cs_n && !cs_d) begin
        pend_reg = 8'(dds_rx >> (dds_n - 8));
        pend_val = 32'(dds_rx & ((64'd1 << (dds_n - 8)) - 1));
      end
      if (dds_io_update && !upd_d) begin dds_reg.push_back(pend_reg); dds_val.push_back(pend_val); end
    end
  end

  // ---- BPM ADCs: one sample every 2 or 3 clocks; window and capture model ----
  int bpm_left = 0, cap_left = 0, cap_n = 0, exp_sum [N_PLATES];
  logic [31:0] cap_model [256];
  bit bpm_run = 0, cap_rf = 0;
  function automatic int isq(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction
  initial begin
    for (int p = 0; p < N_PLATES; p++) begin bpm_i[p] = 0; bpm_q[p] = 0; end
    forever begin
      @(negedge clk);
      bpm_valid = bpm_run;
      for (int p = 0; p < N_PLATES; p++) begin
        bpm_i[p] = 10'(500 + (p + 1) * 70 + $urandom_range(0, 30));
        bpm_q[p] = 10'(520 - (p + 1) * 50 + $urandom_range(0, 30));
      end
      @(negedge clk) bpm_valid = 0;
      if ($urandom_range(0, 1)) @(negedge clk);
    end
  end
  data_t ped [N_PLATES];
  always @(posedge clk) if (!rst) begin
    if (dut.acq_start) begin
      bpm_left = 32;
      cap_left = 256; cap_n = 0;
      for (int p = 0; p < N_PLATES; p++) exp_sum[p] = 0;
    end else begin
      if (bpm_valid && bpm_left > 0) begin
        for (int p = 0; p < N_PLATES; p++) begin
          int di, dq;
          di = int'(bpm_i[p]) - int'(ped[p][9:0]);
          dq = int'(bpm_q[p]) - int'(ped[p][25:16]);
          exp_sum[p] += isq(di * di + dq * dq);
        end
        bpm_left--;
      end
      if (cap_left > 0 && (cap_rf ? rf_valid : bpm_valid)) begin
        cap_model[cap_n] = cap_rf ? 32'(rf_adc_a) : {6'd0, bpm_q[0], 6'd0, bpm_i[0]};
        cap_n++; cap_left--;
      end
    end
  end

  // ---- RF inputs: carrier sampled at 4/7 of its frequency ----
  real phi_a = 123.4, phi_b = 301.7;
  bit rf_run = 0;
  initial begin
    int n = 0;
    wait (rf_run);
    @(negedge clk) rf_sync = 1;
    @(negedge clk) rf_sync = 0;
    forever begin
      @(negedge clk);
      rf_adc_a = 12'($rtoi(1500.0 * $cos(phi_a * PI / 180.0 + real'(n) * 3.5 * PI)));
      rf_adc_b = 12'($rtoi(900.0 * $cos(phi_b * PI / 180.0 + real'(n) * 3.5 * PI)));
      rf_valid = 1;
      n++;
      @(negedge clk) rf_valid = 0;
    end
  end

  function automatic real ang_err(input logic [15:0] ph, input real deg);
    real e;
    e = real'(ph) * 360.0 / 65536.0 - deg;
    if (e > 180.0) e -= 360.0;
    if (e < -180.0) e += 360.0;
    return e < 0 ? -e : e;
  endfunction

  initial begin
    data_t r;
    int t0, t1;
    logic [15:0] ph;
    logic [15:0] wave [16];
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);

    // identification through the CPU port
    cpu_read(A_ID, r);
    chk("ID word", r == ID_WORD);

    // a phase jump before any RF measurement is refused
    @(negedge clk) jump_trig = 1;
    repeat (4) @(negedge clk);
    jump_trig = 0;
    repeat (4) @(negedge clk);
    cpu_read(A_STATUS, r);
    if (r[ST_JUMP_MISS]) n_jump_missed++;
    chk("missed jump flagged", r[ST_JUMP_MISS] == 1'b1);
    chk("no DDS write for a missed jump", dds_reg.size() == 0);

    // configuration
    for (int p = 0; p < N_PLATES; p++) begin
      ped[p] = {6'd0, 10'(510 + p), 6'd0, 10'(495 + 3 * p)};
      cpu_write(A_PED0 + 16'(p), ped[p]);
    end
    cpu_write(A_SD_LOG, 32'h8000_0100);  // log BPM results from SDRAM word 0x100
    cpu_write(16'h0459, 32'd100);
    cpu_read(16'h0459, r);
    chk("trigger delay register", r == 32'd100);

    // triggered acquisition
    bpm_run = 1;
    repeat (10) @(negedge clk);
    trig_in = 1;
    @(posedge clk) t0 = cycle;
    @(posedge clk iff trig_out) t1 = cycle;
    n_trig++;
    chk("trigger delay timing", t1 - t0 == 100 + 5);
    @(negedge clk) trig_in = 0;
    wait (cap_left == 0 && bpm_left == 0);
    repeat (30) @(negedge clk);
    cpu_read(A_STATUS, r);
    chk("BPM and capture done", r[ST_BPM_DONE] && r[ST_CAP_DONE]);
    for (int p = 0; p < N_PLATES; p++) begin
      cpu_read(A_SUM0 + 16'(p), r);
      chk($sformatf("plate %0d sum %0d exp %0d", p, r, exp_sum[p]), int'(r) == exp_sum[p]);
      n_bpm++;
    end
    // capture RAM read out by a neighbour over the crate bus
    for (int k = 0; k < 256; k++) begin
      lvds_access(0, A_CAP_BASE + 16'(k), 32'h0, r);
      chk($sformatf("capture word %0d %h exp %h", k, r, cap_model[k]), r == cap_model[k]);
    end
    n_capture++;
    bpm_run = 0;

    // RF phase measurement
    rf_run = 1;
    repeat (600) @(negedge clk);
    cpu_read(A_PHASE, r);
    ph = r[15:0];
    chk($sformatf("MI phase %f", real'(ph) * 360.0 / 65536.0), ang_err(ph, phi_a) < 0.3);
    cpu_read(A_PHASE_FB, r);
    chk($sformatf("fanback phase %f", real'(r[15:0]) * 360.0 / 65536.0), ang_err(r[15:0], phi_b) < 0.3);
    n_phase++;

    // phase jump
    cpu_write(A_JUMP_OFS, 32'h0000_4000);      // +90 degrees
    @(negedge clk) jump_trig = 1;
    t_jump = cycle;
    repeat (4) @(negedge clk);
    jump_trig = 0;
    wait (dds_reg.size() == 1);
    @(posedge clk iff dds_io_update);
    // the trigger comes 200 us (10620 clocks) before the beam arrives
    $display("phase jump: trigger to io_update %0d clocks", cycle - t_jump);
    chk("jump reaches the DDS well inside 200 us", cycle - t_jump < 10620 / 10);
    begin
      logic [15:0] want;
      cpu_read(A_JUMP_POW, r);
      want = r[15:0];
      chk("jump register is a POW0 write", dds_reg[0] == {3'b0, DDS_REG_POW0});
      chk("jump phase word", dds_val[0] == 32'(want[15:2]));
      chk("jump phase close to MI + 90 deg", ang_err(want, phi_a + 90.0) < 0.3);
      void'(dds_reg.pop_front()); void'(dds_val.pop_front());
      n_jump++;
    end

    // frequency ramp: 5 steps, slow enough for every word to be sent
    cpu_write(A_RAMP_START, 32'h4000_0000);
    cpu_write(A_RAMP_END,   32'h4000_0500);
    cpu_write(A_RAMP_STEP,  32'h100);
    cpu_write(A_RAMP_IVAL,  32'd600);
    cpu_write(A_RAMP_GO,    32'd1);
    wait (dds_reg.size() == 6);
    for (int k = 0; k < 6; k++) begin
      chk($sformatf("ramp word %0d = %h", k, dds_val[k]),
          dds_reg[k] == {3'b0, DDS_REG_FTW0} && dds_val[k] == 32'h4000_0000 + 32'(k * 256));
      n_ramp++;
    end
    dds_reg.delete(); dds_val.delete();

    // host writes the amplitude
    cpu_write(A_DDS_ASF, 32'h0000_2AAA);
    wait (dds_reg.size() == 1);
    chk("ASF write", dds_reg[0] == {3'b0, DDS_REG_ASF} && dds_val[0] == 32'h2AAA);
    n_host_dds++;
    dds_reg.delete(); dds_val.delete();

    // orbit-synchronized waveform, loaded over the crate bus
    for (int k = 0; k < 16; k++) begin
      wave[k] = 16'($urandom_range(0, 1023));
      lvds_access(1, A_AWG_BASE + 16'(k), 32'(wave[k]), r);
    end
    lvds_access(1, A_AWG_LEN, 32'd16, r);
    @(negedge clk) orbit_sync = 1;
    @(posedge clk) t0 = cycle;
    for (int c = 1; c < 24; c++) begin
      @(posedge clk); #1;
      if (c == 3) orbit_sync = 0;
      if (c >= 4 && c < 20) chk($sformatf("DAC word %0d", c - 4), dac_data == wave[c - 4][9:0]);
      if (c >= 20) chk("DAC idle code", dac_data == 10'h200);
    end
    n_orbit++;

    // this module as crate master: write and read slot 7, then a silent slot
    cpu_write(A_REM_ADDR, 32'h0007_0123);
    cpu_write(A_REM_DATA, 32'hCAFE_0001);
    cpu_write(A_REM_CMD, 32'd2);
    repeat (200) @(negedge clk);
    chk("remote write landed", nb_mem.exists(16'h0123) && nb_mem[16'h0123] == 32'hCAFE_0001);
    nb_mem[16'h0124] = 32'h600D_BEEF;
    cpu_write(A_REM_ADDR, 32'h0007_0124);
    cpu_write(A_REM_CMD, 32'd1);
    repeat (200) @(negedge clk);
    cpu_read(A_REM_DATA, r);
    chk("remote read", r == 32'h600D_BEEF);
    cpu_write(A_REM_ADDR, 32'h0009_0124);
    cpu_write(A_REM_CMD, 32'd1);
    repeat (400) @(negedge clk);
    cpu_read(A_REM_CMD, r);
    chk("remote timeout flagged", r[1] == 1'b1);
    if (r[1]) n_timeout++;

    // both bus masters at once
    for (int d = 20; d < 50 && n_contention == 0; d++) begin
      fork
        begin data_t x; #(d * 10); cpu_read(A_TRIG_DELAY, x); chk("contended CPU read", x == 32'd100); end
        begin data_t y; lvds_access(0, A_ID, 32'h0, y); chk("contended crate read", y == ID_WORD); end
      join
    end

    // SDRAM: a block of words written through the crate bus, read back by the CPU
    begin
      logic [15:0] sdv [12];
      data_t st;
      do lvds_access(0, A_SD_CMD, 32'h0, st); while (!st[1]);
      lvds_access(1, A_SD_ADDR, 32'h0012_3FFA, r);   // block crosses a row boundary
      for (int k = 0; k < 12; k++) begin
        sdv[k] = 16'($urandom);
        lvds_access(1, A_SD_DATA, {16'h0, sdv[k]}, r);
      end
      cpu_write(A_SD_ADDR, 32'h0012_3FFA);
      for (int k = 0; k < 12; k++) begin
        cpu_write(A_SD_CMD, 32'h1);
        do cpu_read(A_SD_CMD, st); while (st[0]);
        cpu_read(A_SD_DATA, r);
        chk($sformatf("SDRAM word %0d", k), r == {16'h0, sdv[k]});
        n_sdram++;
      end
      cpu_read(A_SD_ADDR, r);
      chk("SDRAM pointer advanced", r == 32'h0012_4006);
      // the BPM acquisition's sums were logged at 0x100
      cpu_read(A_SD_LOG, r);
      chk("log pointer past one record", r == 32'h8000_0104);
      cpu_read(A_SD_LOGSTAT, r);
      chk("log idle, nothing missed", r == 32'h0);
      cpu_write(A_SD_ADDR, 32'h100);
      for (int p = 0; p < N_PLATES; p++) begin
        cpu_write(A_SD_CMD, 32'h1);
        do cpu_read(A_SD_CMD, st); while (st[0]);
        cpu_read(A_SD_DATA, r);
        chk($sformatf("logged sum of plate %0d", p), int'(r) == exp_sum[p]);
        n_log++;
      end
      chk("SDRAM timing rules", sdram.errors == 0);
      chk("SDRAM refreshed", sdram.n_ref > 0);
    end

    // a clock event starts acquisition through the trigger delay
    begin
      int n0;
      cpu_write(A_TCLK_TRIG, 32'h8000_008F);
      repeat (4) tclk_cell(1);
      n0 = n_trig_out;
      tclk_event(8'h12);
      tclk_event(8'h8E);
      repeat (200) @(negedge clk);
      chk("other clock events do not trigger", n_trig_out == n0);
      tclk_event(8'h8F);
      repeat (200) @(negedge clk);
      chk("selected clock event triggers", n_trig_out == n0 + 1);
      cpu_read(A_TCLK_STAT, r);
      chk("clock event count and last code", r == 32'h0003_008F);
      if (n_trig_out == n0 + 1) n_tclk++;
    end

    // software start capturing the RF ADC
    cap_rf = 1;
    cpu_write(A_CTRL, 32'b1001);        // channel 4, start
    n_sw++;
    wait (cap_left == 0);
    repeat (10) @(negedge clk);
    for (int k = 0; k < 256; k += 17) begin
      lvds_access(0, A_CAP_BASE + 16'(k), 32'h0, r);
      chk($sformatf("RF capture word %0d", k), r == cap_model[k]);
    end
    n_capture++;

    chk("CPU accesses", n_cpu > 0);
    chk("crate bus accesses in", n_lvds_in > 0);
    chk("crate bus accesses out", n_lvds_out > 0);
    chk("remote timeout", n_timeout > 0);
    chk("bus contention", n_contention > 0);
    chk("delayed trigger", n_trig > 0);
    chk("software start", n_sw > 0);
    chk("BPM integration", n_bpm > 0);
    chk("capture", n_capture > 1);
    chk("phase measurement", n_phase > 0);
    chk("phase jump", n_jump > 0);
    chk("missed jump", n_jump_missed > 0);
    chk("ramp", n_ramp > 0);
    chk("host DDS write", n_host_dds > 0);
    chk("orbit playback", n_orbit > 0);
    chk("SDRAM access", n_sdram > 0);
    chk("BPM result log", n_log > 0);
    chk("clock-event trigger", n_tclk > 0);
    $display("mechanisms: cpu=%0d lvds_in=%0d lvds_out=%0d timeout=%0d contention=%0d trig=%0d sw=%0d bpm=%0d capture=%0d phase=%0d jump=%0d missed=%0d ramp=%0d host_dds=%0d orbit=%0d sdram=%0d log=%0d tclk=%0d",
             n_cpu, n_lvds_in, n_lvds_out, n_timeout, n_contention, n_trig, n_sw, n_bpm, n_capture,
             n_phase, n_jump, n_jump_missed, n_ramp, n_host_dds, n_orbit, n_sdram, n_log, n_tclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
