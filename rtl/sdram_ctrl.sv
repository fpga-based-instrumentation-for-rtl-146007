// sdram_ctrl: controller for the board's 16M x 16 SDR SDRAM (32 MB).
//
// The SDRAM holds diagnostic data and extends the microcontroller's small
// memory. This controller gives the rest of the FPGA single-word reads and
// writes at a 24-bit word address, split as {bank[1:0], row[12:0],
// column[8:0]} for the common 4-bank, 8192-row, 512-column organization.
// Each access opens the row (ACTIVE), waits T_RCD, issues READ or WRITE with
// auto-precharge (A10 high) and waits until the bank is precharged again
// (closed-page policy), so every access costs the same fixed time and no
// open-row bookkeeping is needed.
//
// After reset the controller performs the standard power-up sequence: wait
// T_INIT clocks with NOPs, PRECHARGE ALL, two AUTO REFRESH commands and LOAD
// MODE REGISTER (burst length 1, sequential, CAS latency CAS). ready then
// rises. An AUTO REFRESH is issued every T_REFI clocks (8192 rows per 64 ms),
// ahead of any waiting access.
//
// Interface: req with we, addr and wdata is held until ack (one clock, when
// the access is accepted). A read's data appear on rdata with rvalid
// T_RCD + CAS + 2 clocks after ack. Commands and addresses are registered
// onto the pins; read data are taken from dq_in CAS clocks after the READ
// command is on the pins. Timing defaults are clocks of the 53.1 MHz board
// clock (18.8 ns) for a -7E-class part. The SDRAM size comes from the
// design description; the organization, timing and policy are this design's.
// Every access moves a whole 16-bit word, so the byte masks sd_dqm are tied
// low; they are kept as outputs because the board routes those pins.
module sdram_ctrl #(
  parameter int ROW_W  = 13,
  parameter int COL_W  = 9,
  parameter int BANK_W = 2,
  parameter int T_INIT = 5310,  // 100 us
  parameter int T_RP   = 2,     // 20 ns
  parameter int T_RCD  = 2,     // 20 ns
  parameter int T_RFC  = 4,     // 66 ns
  parameter int T_MRD  = 2,
  parameter int T_WR   = 2,     // write recovery before the auto-precharge
  parameter int CAS    = 2,
  parameter int T_REFI = 410,   // 7.8 us less margin
  localparam int AW    = BANK_W + ROW_W + COL_W
) (
  input  logic              clk,
  input  logic              rst,
  // user port
  input  logic              req,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [15:0]       wdata,
  output logic              ack,
  output logic [15:0]       rdata,
  output logic              rvalid,
  output logic              ready,
  // SDRAM pins
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BANK_W-1:0] sd_ba,
  output logic [ROW_W-1:0]  sd_a,
  output logic [1:0]        sd_dqm,
  output logic [15:0]       sd_dq_out,
  output logic              sd_dq_oe,
  input  logic [15:0]       sd_dq_in
);
  typedef enum logic [3:0] {
    S_INIT, S_PREALL, S_REF1, S_REF2, S_MRS, S_IDLE, S_ACT, S_RW, S_RD_WAIT, S_WR_WAIT, S_REF
  } state_t;
  typedef enum logic [3:0] {
    C_NOP = 4'b0111, C_ACT = 4'b0011, C_READ = 4'b0101, C_WRITE = 4'b0100,
    C_PRE = 4'b0010, C_REF = 4'b0001, C_MRS = 4'b0000
  } cmd_t;

  // burst length 1, sequential, CAS latency, programmed burst
  localparam logic [ROW_W-1:0] MODE = ROW_W'((CAS & 7) << 4);
  localparam int TW = $clog2(T_INIT + 1);

  state_t              state;
  logic [TW-1:0]       tmr;
  logic [$clog2(T_REFI+1)-1:0] ref_cnt;
  logic                ref_due;
  logic                op_we;
  logic [COL_W-1:0]    op_col;
  logic [15:0]         op_wdata;
  logic [CAS+1:0]      rd_pipe;
  cmd_t                cmd;

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_dqm = 2'b00;
  assign ack    = (state == S_IDLE) && req && !ref_due;

  // refresh timer
  always_ff @(posedge clk) begin
    if (rst) begin
      ref_cnt <= '0;
      ref_due <= 1'b0;
    end else if (state == S_REF && tmr == '0) begin
      ref_due <= 1'b0;
    end else if (ready) begin
      if (ref_cnt == '0) begin
        ref_cnt <= ($clog2(T_REFI+1))'(T_REFI - 1);
        ref_due <= 1'b1;
      end else ref_cnt <= ref_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT;
      tmr       <= TW'(T_INIT);
      cmd       <= C_NOP;
      sd_cke    <= 1'b0;
      sd_ba     <= '0;
      sd_a      <= '0;
      sd_dq_out <= '0;
      sd_dq_oe  <= 1'b0;
      ready     <= 1'b0;
      op_we     <= 1'b0;
      op_col    <= '0;
      op_wdata  <= '0;
    end else begin
      cmd      <= C_NOP;
      sd_dq_oe <= 1'b0;
      if (tmr != '0) tmr <= tmr - 1'b1;
      unique case (state)
        S_INIT: begin
          sd_cke <= 1'b1;
          if (tmr == '0) begin
            cmd      <= C_PRE;
            sd_a[10] <= 1'b1;          // all banks
            tmr      <= TW'(T_RP - 1);
            state    <= S_PREALL;
          end
        end
        S_PREALL: if (tmr == '0) begin
          cmd   <= C_REF;
          tmr   <= TW'(T_RFC - 1);
          state <= S_REF1;
        end
        S_REF1: if (tmr == '0) begin
          cmd   <= C_REF;
          tmr   <= TW'(T_RFC - 1);
          state <= S_REF2;
        end
        S_REF2: if (tmr == '0) begin
          cmd   <= C_MRS;
          sd_ba <= '0;
          sd_a  <= MODE;
          tmr   <= TW'(T_MRD - 1);
          state <= S_MRS;
        end
        S_MRS: if (tmr == '0) begin
          ready <= 1'b1;
          state <= S_IDLE;
        end
        S_IDLE: begin
          if (ref_due) begin
            cmd   <= C_REF;
            tmr   <= TW'(T_RFC - 1);
            state <= S_REF;
          end else if (req) begin
            op_we    <= we;
            op_col   <= addr[COL_W-1:0];
            op_wdata <= wdata;
            cmd      <= C_ACT;
            sd_ba    <= addr[AW-1 -: BANK_W];
            sd_a     <= addr[COL_W +: ROW_W];
            tmr      <= TW'(T_RCD - 1);
            state    <= S_ACT;
          end
        end
        S_ACT: if (tmr == '0) begin
          cmd       <= op_we ? C_WRITE : C_READ;
          sd_a      <= ROW_W'(op_col) | ROW_W'(1 << 10);   // auto-precharge
          sd_dq_out <= op_wdata;
          sd_dq_oe  <= op_we;
          tmr       <= op_we ? TW'(T_WR + T_RP - 1) : TW'(CAS + T_RP - 1);
          state     <= op_we ? S_WR_WAIT : S_RD_WAIT;
        end
        S_RD_WAIT, S_WR_WAIT, S_REF: if (tmr == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // read data: READ on the pins during clock n, data sampled CAS clocks later
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pipe <= '0;
      rvalid  <= 1'b0;
      rdata   <= '0;
    end else begin
      rd_pipe <= {rd_pipe[CAS:0], (state == S_ACT && tmr == '0 && !op_we)};
      rvalid  <= rd_pipe[CAS];
      if (rd_pipe[CAS]) rdata <= sd_dq_in;
    end
  end

  a_no_req_drop: assert property (@(posedge clk) disable iff (rst) req && !ack |=> req);
endmodule
