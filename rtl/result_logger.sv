// result_logger: records a history of BPM results in the SDRAM.
//
// Each time the BPM processor finishes an integration (event_in), the logger
// takes the N_WORDS plate sums and writes them to consecutive SDRAM words at
// its log pointer, which then points past them. Successive acquisitions so
// build up a record of beam intensity and position pulse by pulse, for the
// host to read back through the SDRAM pointer registers at leisure. The
// 24-bit pointer wraps at the end of the memory; the host sets it with load,
// which is meant for while logging is disabled.
//
// Interface: event_in is a one-clock pulse with words valid in the same clock.
// req, addr and wdata go to the SDRAM controller and are held until ack; one
// word is written per ack. busy is high from the event until the last word
// has been acked. An event that arrives while a record is still being written
// is not recorded and counts in missed (saturating at all ones). Nothing is
// recorded while enable is low. Timing: the first request rises in the clock
// after the event; a record of 4 words takes 4 SDRAM writes, about 8 clocks
// each. Keeping diagnostic data in the SDRAM follows the design description;
// recording the integrated sums, and this record layout, are this design's
// choice.
module result_logger #(
  parameter int N_WORDS = 4,
  parameter int W       = 16,
  parameter int AW      = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    enable,
  input  logic                    load,
  input  logic [AW-1:0]           load_ptr,
  input  logic                    event_in,
  input  logic [N_WORDS-1:0][W-1:0] words,
  output logic                    req,
  output logic [AW-1:0]           addr,
  output logic [W-1:0]            wdata,
  input  logic                    ack,
  output logic                    busy,
  output logic [AW-1:0]           ptr,
  output logic [7:0]              missed
);
  localparam int IW = $clog2(N_WORDS + 1);
  logic [N_WORDS-1:0][W-1:0] rec;
  logic [IW-1:0]             idx;

  assign req   = busy;
  assign addr  = ptr;
  assign wdata = rec[idx[$clog2(N_WORDS)-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      ptr    <= '0;
      idx    <= '0;
      missed <= '0;
      rec    <= '0;
    end else begin
      if (busy && ack) begin
        ptr <= ptr + 1'b1;
        idx <= idx + 1'b1;
        if (idx == IW'(N_WORDS - 1)) busy <= 1'b0;
      end
      if (event_in && enable) begin
        if (busy) begin
          if (missed != '1) missed <= missed + 1'b1;
        end else begin
          rec  <= words;
          idx  <= '0;
          busy <= 1'b1;
        end
      end
      if (load) ptr <= load_ptr;
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (rst) req && !ack |=> req);
endmodule
