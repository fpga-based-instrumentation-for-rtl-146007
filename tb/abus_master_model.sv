// abus_master_model: behavioural bus master for testbenches. Its tasks
// perform one write or read with the req/ack handshake and return the
// number of clocks from request to completion.
module abus_master_model (
  input logic    clk,
  abus_if.master m
);
  import ap_pkg::*;
  initial begin
    m.req = 0; m.we = 0; m.addr = '0; m.wdata = '0;
  end

  task automatic write(input addr_t a, input data_t v, output int clocks);
    @(negedge clk);
    m.req = 1; m.we = 1; m.addr = a; m.wdata = v;
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!m.ack);
    @(negedge clk) m.req = 0;
  endtask

  task automatic read(input addr_t a, output data_t v, output int clocks);
    @(negedge clk);
    m.req = 1; m.we = 0; m.addr = a;
    clocks = 0;
    do begin @(posedge clk); clocks++; end while (!m.ack);
    v = m.rdata;
    @(negedge clk) m.req = 0;
  endtask
endmodule
