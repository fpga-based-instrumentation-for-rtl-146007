// capture_buffer: the 256-word data-capture RAM seen by the bus at
// 0x1000-0x10FF.
//
// A start pulse (from the trigger delay or from software) clears the done flag
// and begins recording: every din_valid sample is written at the next address,
// starting from 0, until DEPTH samples are stored; then done rises and the RAM
// holds that record until the next start. The bus reads it through a
// synchronous read port: rd_data shows the word at rd_addr one clock after
// rd_addr is applied. The depth and the bus window follow the design
// description; one record per start is this design's reading of "a RAM holding
// 256 recent ADC samples".
module capture_buffer #(
  parameter int DEPTH = 256,
  parameter int W     = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  din,
  input  logic          din_valid,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic          capturing,
  output logic          done
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      capturing <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      wptr      <= '0;
      capturing <= 1'b1;
      done      <= 1'b0;
    end else if (capturing && din_valid) begin
      wptr <= wptr + 1'b1;
      if (wptr == AW'(DEPTH - 1)) begin
        capturing <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (capturing && din_valid && !start) mem[wptr] <= din;
    rd_data <= mem[rd_addr];
  end
endmodule
