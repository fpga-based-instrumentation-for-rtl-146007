// abus_if: the FPGA-internal A16/D32 bus.
//
// A master raises req with addr, we and wdata and holds them until it sees
// ack. The transfer happens in the one cycle where req and ack are both high;
// rdata is valid in that cycle. The master drops req (or presents a new
// access) in the next cycle. A slave never acks without a request. This
// handshake is this design's own; the description only says the bus carries
// 16-bit addresses and 32-bit data.
interface abus_if;
  import ap_pkg::*;
  logic  req;
  logic  we;
  addr_t addr;
  data_t wdata;
  data_t rdata;
  logic  ack;

  modport master(output req, we, addr, wdata, input rdata, ack);
  modport slave (input req, we, addr, wdata, output rdata, ack);
endinterface
