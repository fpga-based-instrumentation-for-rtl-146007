// ap_pkg: shared constants and types of the antiproton-source instrument FPGA.
//
// The board's FPGA exposes everything (registers, capture RAM, waveform RAM)
// on an internal bus with a 16-bit word address and 32-bit data ("A16/D32",
// modelled after the VME backplane). Two addresses follow the design
// description: the acquisition trigger delay register at 0x0459 and the
// 256-word capture RAM at 0x1000-0x10FF. Every other address below is this
// design's own choice. The AD9953 register numbers are those of the DDS
// chip's data sheet.
package ap_pkg;

  localparam int ADDR_W = 16;
  localparam int DATA_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // ---- register map (word addresses) ----
  localparam addr_t A_ID          = 16'h0000;  // RO identification word
  localparam addr_t A_CTRL        = 16'h0001;  // [0] software start (self-clearing), [3:1] capture channel
  localparam addr_t A_STATUS      = 16'h0002;  // RO status bits, see st_* below
  localparam addr_t A_PED0        = 16'h0010;  // 0x10..0x13: plate pedestals {ped_q[25:16], ped_i[9:0]}
  localparam addr_t A_SUM0        = 16'h0020;  // 0x20..0x23: RO integrated plate magnitudes
  localparam addr_t A_PHASE       = 16'h0030;  // RO measured RF phase, full turn = 2^16
  localparam addr_t A_JUMP_OFS    = 16'h0031;  // phase added to the measured phase at the jump
  localparam addr_t A_JUMP_POW    = 16'h0032;  // RO last phase sent at a jump (16-bit)
  localparam addr_t A_PHASE_FB    = 16'h0033;  // RO measured phase of the second RF input
  localparam addr_t A_IQ_MI       = 16'h0034;  // RO {Q[31:16], I[15:0]} sums of the first RF input (top 16 bits)
  localparam addr_t A_IQ_FB       = 16'h0035;  // RO same for the second RF input
  localparam addr_t A_COUNTS      = 16'h0036;  // RO {orbit markers[31:16], DDS writes[15:0]}
  localparam addr_t A_RAMP_START  = 16'h0040;
  localparam addr_t A_RAMP_END    = 16'h0041;
  localparam addr_t A_RAMP_STEP   = 16'h0042;
  localparam addr_t A_RAMP_IVAL   = 16'h0043;  // clocks per ramp step
  localparam addr_t A_RAMP_GO     = 16'h0044;  // write: start ramp
  localparam addr_t A_RAMP_FTW    = 16'h0045;  // RO present tuning word
  localparam addr_t A_DDS_FTW     = 16'h0048;  // write: send FTW0 to the DDS
  localparam addr_t A_DDS_POW     = 16'h0049;  // write: send POW0 to the DDS
  localparam addr_t A_DDS_ASF     = 16'h004A;  // write: send ASF (amplitude) to the DDS
  localparam addr_t A_AWG_LEN     = 16'h0050;  // samples played after each orbit marker
  localparam addr_t A_REM_ADDR    = 16'h0060;  // LVDS master: {slot[19:16], addr[15:0]}
  localparam addr_t A_REM_DATA    = 16'h0061;  // LVDS master: write data / read result
  localparam addr_t A_REM_CMD     = 16'h0062;  // write 1 = remote read, 2 = remote write; read = status
  localparam addr_t A_SD_ADDR     = 16'h0070;  // SDRAM word pointer (24 bits)
  localparam addr_t A_SD_DATA     = 16'h0071;  // write: store at pointer; read: last word fetched
  localparam addr_t A_SD_CMD      = 16'h0072;  // write: fetch word at pointer; read: {ready, busy}
  localparam addr_t A_SD_LOG      = 16'h0073;  // BPM result log: {enable[31], pointer[23:0]}; write loads both
  localparam addr_t A_SD_LOGSTAT  = 16'h0074;  // RO {busy[8], missed records[7:0]}
  localparam addr_t A_TCLK_TRIG   = 16'h0080;  // {enable[31], event code[7:0]} that starts acquisition
  localparam addr_t A_TCLK_STAT   = 16'h0081;  // RO {events[31:16], parity errors[15:8], last event[7:0]}
  localparam addr_t A_TRIG_DELAY  = 16'h0459;  // trigger-to-acquisition delay, clocks
  localparam addr_t A_AWG_BASE    = 16'h0800;  // 0x0800..0x0BFF waveform RAM
  localparam addr_t A_CAP_BASE    = 16'h1000;  // 0x1000..0x10FF capture RAM

  localparam data_t ID_WORD = 32'hA9B0_0001;

  // status register bits
  localparam int ST_CAP_DONE  = 0;
  localparam int ST_BPM_DONE  = 1;
  localparam int ST_RAMP_BUSY = 2;
  localparam int ST_PHASE_OK  = 3;
  localparam int ST_DDS_BUSY  = 4;
  localparam int ST_REM_BUSY  = 5;
  localparam int ST_REM_ERR   = 6;
  localparam int ST_TRIG_WAIT = 7;
  localparam int ST_CAP_BUSY  = 8;
  localparam int ST_JUMP_MISS = 9;
  localparam int ST_AWG_PLAY  = 10;

  // AD9953 serial register addresses (from the chip's data sheet)
  localparam logic [4:0] DDS_REG_ASF  = 5'h02;
  localparam logic [4:0] DDS_REG_FTW0 = 5'h04;
  localparam logic [4:0] DDS_REG_POW0 = 5'h05;

  // one write to the DDS: register, data left-aligned, byte count
  typedef struct packed {
    logic [4:0]  reg_addr;
    logic [31:0] data;      // transmitted MSB first from bit 31
    logic [2:0]  nbytes;    // 1..4
  } dds_cmd_t;

  // serial frame of the inter-module LVDS bus: MSB first
  localparam int SLOT_W  = 4;
  localparam int FRAME_W = 1 + SLOT_W + ADDR_W + DATA_W;  // rw, slot, addr, data = 53 bits

  typedef struct packed {
    logic              we;
    logic [SLOT_W-1:0] slot;
    addr_t             addr;
    data_t             data;
  } lvds_frame_t;

  // ---- register file contents and status seen by the bus ----
  localparam int N_PLATES = 4;

  typedef struct packed {
    logic [2:0]             cap_sel;     // capture channel
    logic                   sw_start;    // one-clock software acquisition start
    logic [N_PLATES-1:0][9:0] ped_i;
    logic [N_PLATES-1:0][9:0] ped_q;
    logic [31:0]            trig_delay;
    logic [15:0]            jump_ofs;
    logic [31:0]            ramp_start;
    logic [31:0]            ramp_end;
    logic [31:0]            ramp_step;
    logic [15:0]            ramp_ival;
    logic                   ramp_go;     // one-clock pulse
    logic                   host_req;    // held until the DDS controller acks
    dds_cmd_t               host_cmd;
    logic [10:0]            awg_len;
    logic                   awg_we;      // one-clock write into the waveform RAM
    logic [9:0]             awg_waddr;
    logic [9:0]             awg_wdata;
    logic [SLOT_W+15:0]     rem_addr;
    logic [31:0]            rem_wdata;
    logic                   rem_go;      // one-clock pulse
    logic                   rem_we;
    logic [23:0]            sd_ptr;      // advances by one after every SDRAM access
    logic [15:0]            sd_wdata;
    logic                   sd_req;      // held until the SDRAM controller acks
    logic                   sd_we;
    logic                   log_en;
    logic                   log_load;    // one-clock pulse
    logic [23:0]            log_base;
    logic                   tclk_en;
    logic [7:0]             tclk_code;
  } ctrl_t;

  typedef struct packed {
    logic                   cap_done;
    logic                   bpm_done;
    logic [N_PLATES-1:0][15:0] sums;
    logic [15:0]            phase;
    logic                   phase_ok;
    logic [15:0]            jump_phase;
    logic                   ramp_busy;
    logic [31:0]            ramp_ftw;
    logic                   dds_busy;
    logic                   rem_busy;
    logic                   rem_err;
    logic [31:0]            rem_rdata;
    logic [15:0]            phase_fb;
    logic [31:0]            iq_mi;
    logic [31:0]            iq_fb;
    logic [15:0]            dds_writes;
    logic [15:0]            orbits;
    logic                   trig_wait;
    logic                   cap_busy;
    logic                   jump_missed;
    logic                   awg_playing;
    logic [31:0]            cap_rdata;   // capture RAM word, one clock after the address
    logic [9:0]             awg_rdata;   // waveform RAM word, one clock after the address
    logic                   sd_ack;      // SDRAM controller took the request
    logic                   sd_busy;     // request or read still outstanding
    logic                   sd_ready;    // SDRAM initialised
    logic [15:0]            sd_rdata;    // last word read from the SDRAM
    logic [23:0]            log_ptr;
    logic                   log_busy;
    logic [7:0]             log_missed;
    logic [7:0]             tclk_last;
    logic [15:0]            tclk_count;
    logic [7:0]             tclk_perr;
  } status_t;

endpackage
