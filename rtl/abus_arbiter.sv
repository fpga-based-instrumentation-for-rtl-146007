// abus_arbiter: shares the internal bus between its two masters, the CPU
// port (m0) and the inter-module LVDS port (m1).
//
// When the bus is idle the arbiter grants it to a requesting master, m0 first
// when both ask in the same cycle, and keeps the grant until that access has
// completed (req and ack high together). The granted master's signals pass
// straight through, so the arbiter adds no latency once granted; a grant takes
// one clock. Fixed priority is this design's choice.
module abus_arbiter (
  input logic    clk,
  input logic    rst,
  abus_if.slave  m0,
  abus_if.slave  m1,
  abus_if.master s
);
  typedef enum logic [1:0] {IDLE, GRANT0, GRANT1} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else unique case (state)
      IDLE:    if (m0.req) state <= GRANT0;
               else if (m1.req) state <= GRANT1;
      GRANT0:  if (s.req && s.ack) state <= IDLE;
      GRANT1:  if (s.req && s.ack) state <= IDLE;
      default: state <= IDLE;
    endcase
  end

  always_comb begin
    s.req   = 1'b0;
    s.we    = 1'b0;
    s.addr  = '0;
    s.wdata = '0;
    unique case (state)
      GRANT0: begin s.req = m0.req; s.we = m0.we; s.addr = m0.addr; s.wdata = m0.wdata; end
      GRANT1: begin s.req = m1.req; s.we = m1.we; s.addr = m1.addr; s.wdata = m1.wdata; end
      default: ;
    endcase
  end

  assign m0.rdata = s.rdata;
  assign m1.rdata = s.rdata;
  assign m0.ack   = (state == GRANT0) && s.ack;
  assign m1.ack   = (state == GRANT1) && s.ack;

  // a master holds its request until it is served
  a_m0_hold: assert property (@(posedge clk) disable iff (rst) m0.req && !m0.ack |=> m0.req);
  a_m1_hold: assert property (@(posedge clk) disable iff (rst) m1.req && !m1.ack |=> m1.req);
endmodule
