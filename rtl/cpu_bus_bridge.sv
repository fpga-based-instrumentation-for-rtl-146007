// cpu_bus_bridge: the microcontroller's way onto the internal A16/D32 bus.
//
// The board's CPU reaches the FPGA through about a dozen general-purpose pins;
// here they are 8 data lines, a 2-bit register select and read and write
// strobes. The CPU shifts in a 16-bit address and, for a write, 32 bits of
// data, one byte at a time, most significant byte first, then writes a command
// byte; the bridge performs the bus access and, for a read, leaves the 32-bit
// result in the data shift register, where the CPU reads it out byte by byte.
//
//   cpu_a = 0  write: shift a byte into the address register
//   cpu_a = 1  write: shift a byte into the data register
//              read : return the top byte of the data register, then rotate it
//   cpu_a = 2  write: 1 = bus read, 2 = bus write;  read: bit 0 = busy
//   cpu_a = 3  read : constant 0xA5, lets firmware check the link
//
// Strobes are active high and asynchronous to clk: they pass two flip-flops
// and act on their rising edge, so each must last at least three clocks, with
// cpu_a and cpu_d_in stable meanwhile. cpu_d_oe is high while cpu_rd is
// asserted. The pin split and this protocol are this design's own; the
// description gives only the pin count and the bus it emulates.
module cpu_bus_bridge
  import ap_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] cpu_d_in,
  output logic [7:0] cpu_d_out,
  output logic       cpu_d_oe,
  input  logic [1:0] cpu_a,
  input  logic       cpu_rd,
  input  logic       cpu_wr,
  abus_if.master     m
);
  logic [SYNC_STAGES:0] rd_sync, wr_sync;
  logic wr_rise, rd_fall, rd_level;
  addr_t addr_q;
  data_t data_q;
  logic  busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_sync <= '0;
      wr_sync <= '0;
    end else begin
      rd_sync <= {rd_sync[SYNC_STAGES-1:0], cpu_rd};
      wr_sync <= {wr_sync[SYNC_STAGES-1:0], cpu_wr};
    end
  end
  assign rd_fall  = rd_sync[SYNC_STAGES] & ~rd_sync[SYNC_STAGES-1];
  assign wr_rise  = wr_sync[SYNC_STAGES-1] & ~wr_sync[SYNC_STAGES];
  assign rd_level = rd_sync[SYNC_STAGES-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q <= '0;
      data_q <= '0;
      busy   <= 1'b0;
      m.req  <= 1'b0;
      m.we   <= 1'b0;
    end else begin
      if (wr_rise && !busy) begin
        unique case (cpu_a)
          2'd0: addr_q <= {addr_q[7:0], cpu_d_in};
          2'd1: data_q <= {data_q[23:0], cpu_d_in};
          2'd2: if (cpu_d_in == 8'd1 || cpu_d_in == 8'd2) begin
                  busy  <= 1'b1;
                  m.req <= 1'b1;
                  m.we  <= (cpu_d_in == 8'd2);
                end
          default: ;
        endcase
      end
      // the byte is presented while the strobe is high; advance at its release
      if (rd_fall && cpu_a == 2'd1 && !busy)
        data_q <= {data_q[23:0], data_q[31:24]};
      if (m.req && m.ack) begin
        m.req <= 1'b0;
        busy  <= 1'b0;
        if (!m.we) data_q <= m.rdata;
      end
    end
  end

  assign m.addr  = addr_q;
  assign m.wdata = data_q;

  always_comb begin
    unique case (cpu_a)
      2'd0:    cpu_d_out = addr_q[7:0];
      2'd1:    cpu_d_out = data_q[31:24];
      2'd2:    cpu_d_out = {7'd0, busy};
      default: cpu_d_out = 8'hA5;
    endcase
  end
  assign cpu_d_oe = rd_level;
endmodule
