// dds_ctrl: loads frequency, phase and amplitude into the AD9953 DDS.
//
// The RF board synthesizes its 53 MHz drive with an AD9953 direct digital
// synthesizer whose frequency, phase and amplitude are set by the FPGA. This
// block is the FPGA side of the chip's serial port. Three sources ask for
// writes with a level request held until ack: the phase jump (phase offset
// word POW0), the frequency ramp (tuning word FTW0) and the bus host (any of
// FTW0, POW0, ASF). The highest-priority pending request is taken when the
// port is idle, phase jump first, then ramp, then host.
//
// A write is an instruction byte (bit 7 = 0 for write, bits 4:0 = register)
// followed by the register's bytes, most significant first, with cs_n low.
// sdio changes while sclk is low and the chip samples it on the sclk rising
// edge; sclk is low and high for SCLK_DIV clocks each. After cs_n returns high
// io_update pulses for SCLK_DIV clocks so the new value takes effect at once.
// cs_n is low for 16 * (1 + bytes) * SCLK_DIV clocks; io_update is then high
// for SCLK_DIV clocks.
// Register numbers and widths follow the AD9953 data sheet; the arbitration
// and the port timing are this design's choices.
module dds_ctrl
  import ap_pkg::*;
#(
  parameter int SCLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst,
  // phase jump
  input  logic        jump_req,
  input  logic [13:0] jump_pow,
  output logic        jump_ack,
  // frequency ramp
  input  logic        ramp_req,
  input  logic [31:0] ramp_ftw,
  output logic        ramp_ack,
  // bus host
  input  logic        host_req,
  input  dds_cmd_t    host_cmd,
  output logic        host_ack,
  // AD9953 pins
  output logic        dds_sclk,
  output logic        dds_sdio,
  output logic        dds_cs_n,
  output logic        dds_io_update,
  output logic        busy,
  output logic [15:0] n_writes
);
  typedef enum logic [1:0] {IDLE, SHIFT, UPDATE} state_t;
  state_t state;

  logic [39:0] sh;
  logic [5:0]  bits;
  logic [$clog2(SCLK_DIV+1)-1:0] tmr;
  dds_cmd_t    pick;
  logic        any;

  always_comb begin
    jump_ack = 1'b0;
    ramp_ack = 1'b0;
    host_ack = 1'b0;
    any      = 1'b1;
    pick     = host_cmd;
    if (jump_req) begin
      pick = '{reg_addr: DDS_REG_POW0, data: {2'b00, jump_pow, 16'h0}, nbytes: 3'd2};
      jump_ack = (state == IDLE);
    end else if (ramp_req) begin
      pick = '{reg_addr: DDS_REG_FTW0, data: ramp_ftw, nbytes: 3'd4};
      ramp_ack = (state == IDLE);
    end else if (host_req) begin
      host_ack = (state == IDLE);
    end else begin
      any = 1'b0;
    end
  end

  assign dds_sdio = sh[39];
  assign busy     = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      sh            <= '0;
      bits          <= '0;
      tmr           <= '0;
      dds_sclk      <= 1'b0;
      dds_cs_n      <= 1'b1;
      dds_io_update <= 1'b0;
      n_writes      <= '0;
    end else begin
      unique case (state)
        IDLE: if (any) begin
          sh       <= {3'b000, pick.reg_addr, pick.data};
          bits     <= 6'(8 + 8 * int'(pick.nbytes));
          tmr      <= ($clog2(SCLK_DIV+1))'(SCLK_DIV - 1);
          dds_cs_n <= 1'b0;
          dds_sclk <= 1'b0;
          state    <= SHIFT;
        end
        SHIFT: begin
          if (tmr != '0) tmr <= tmr - 1'b1;
          else begin
            tmr <= ($clog2(SCLK_DIV+1))'(SCLK_DIV - 1);
            if (!dds_sclk) dds_sclk <= 1'b1;
            else begin
              dds_sclk <= 1'b0;
              if (bits == 6'd1) begin
                dds_cs_n      <= 1'b1;
                dds_io_update <= 1'b1;
                state         <= UPDATE;
              end else begin
                sh   <= sh << 1;
                bits <= bits - 1'b1;
              end
            end
          end
        end
        UPDATE: begin
          if (tmr != '0) tmr <= tmr - 1'b1;
          else begin
            dds_io_update <= 1'b0;
            n_writes      <= n_writes + 1'b1;
            state         <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_cs_during_shift: assert property (@(posedge clk) disable iff (rst) state == SHIFT |-> !dds_cs_n);
  a_one_ack: assert property (@(posedge clk) disable iff (rst) $onehot0({jump_ack, ramp_ack, host_ack}));
endmodule
