// abus_mem_model: behavioural bus slave for testbenches. It answers every
// request on the internal bus after a random wait of 0 to MAX_WAIT clocks,
// from a sparse memory whose unwritten words read as a function of the
// address, and counts the transfers it served.
module abus_mem_model #(
  parameter int MAX_WAIT = 3
) (
  input logic   clk,
  input logic   rst,
  abus_if.slave s
);
  import ap_pkg::*;
  data_t mem [addr_t];
  int    wait_left = -1;
  int    n_reads = 0, n_writes = 0;

  function automatic data_t peek(addr_t a);
    return mem.exists(a) ? mem[a] : {~a, a};
  endfunction

  assign s.rdata = s.ack ? peek(s.addr) : 32'hDEAD_BEEF;

  always @(posedge clk) begin
    if (rst) begin
      s.ack     <= 1'b0;
      wait_left = -1;
    end else begin
      if (s.req && s.ack) begin
        if (s.we) begin mem[s.addr] = s.wdata; n_writes++; end
        else n_reads++;
        s.ack     <= 1'b0;
        wait_left = -1;
      end else if (s.req && !s.ack) begin
        if (wait_left < 0) wait_left = $urandom_range(0, MAX_WAIT);
        if (wait_left == 0) s.ack <= 1'b1;
        else wait_left--;
      end
    end
  end
endmodule
