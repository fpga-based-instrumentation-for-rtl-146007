// lvds_bus_master: sends bus accesses to other modules of the crate.
//
// The module that holds the network connection forwards accesses meant for
// its neighbours over the shared LVDS pairs. The host loads the target
// {slot, address} and, for a write, the data into registers, then starts the
// access; go sends one frame (see lvds_bus_slave for the format) with sync
// high on its first bit, then waits up to TIMEOUT clocks for the addressed
// slave's start bit on the spare line and shifts in the 32 reply bits. busy is
// high from go until the reply is complete; err is set if no reply came.
// rdata holds the reply (the read result, or the echoed write data).
// Timing: FRAME_W clocks to send, the slave's bus latency, 33 clocks of reply.
// Frame, reply and timeout are this design's own protocol.
module lvds_bus_master
  import ap_pkg::*;
#(
  parameter int TIMEOUT = 255
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              go,
  input  logic              we,
  input  logic [SLOT_W-1:0] slot,
  input  addr_t             addr,
  input  data_t             wdata,
  output data_t             rdata,
  output logic              busy,
  output logic              err,
  output logic              sync,
  output logic              sdat,
  input  logic              spare_in
);
  typedef enum logic [1:0] {IDLE, SEND, WAIT, RECV} state_t;
  state_t state;

  logic [FRAME_W-1:0]         sh;
  logic [$clog2(FRAME_W)-1:0] n;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      sh    <= '0;
      n     <= '0;
      tmo   <= '0;
      rdata <= '0;
      err   <= 1'b0;
      sync  <= 1'b0;
      sdat  <= 1'b0;
    end else begin
      sync <= 1'b0;
      unique case (state)
        IDLE: begin
          sdat <= 1'b0;
          if (go) begin
            sh    <= lvds_frame_t'({we, slot, addr, wdata});
            n     <= '0;
            err   <= 1'b0;
            state <= SEND;
          end
        end
        SEND: begin
          sync <= (n == '0);
          sdat <= sh[FRAME_W-1];
          sh   <= sh << 1;
          n    <= n + 1'b1;
          if (n == ($clog2(FRAME_W))'(FRAME_W - 1)) begin
            tmo   <= ($clog2(TIMEOUT+1))'(TIMEOUT);
            state <= WAIT;
          end
        end
        WAIT: begin
          sdat <= 1'b0;
          if (spare_in) begin
            n     <= '0;
            state <= RECV;
          end else if (tmo == '0) begin
            err   <= 1'b1;
            state <= IDLE;
          end else tmo <= tmo - 1'b1;
        end
        RECV: begin
          rdata <= {rdata[30:0], spare_in};
          n     <= n + 1'b1;
          if (n == ($clog2(FRAME_W))'(31)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
