// trigger_delay: programmable delay from a front-panel trigger to the start of
// data acquisition.
//
// The trigger input is asynchronous; it passes two flip-flops and its rising
// edge loads a down-counter with the 32-bit delay register (address 0x0459 on
// the bus). When the counter has run out, start pulses high for one clock.
// Timing: start rises delay + 4 clocks after the clock edge that first samples
// trig_in high. A trigger that arrives while a delay is running is ignored.
// The register width and its role follow the design description; counting in
// system clocks and the retrigger rule are this design's choice.
module trigger_delay #(
  parameter int DELAY_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               trig_in,
  input  logic [DELAY_W-1:0] delay,
  output logic               start,
  output logic               counting
);
  logic [2:0]         sync;
  logic [DELAY_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= '0;
      cnt      <= '0;
      counting <= 1'b0;
      start    <= 1'b0;
    end else begin
      sync  <= {sync[1:0], trig_in};
      start <= 1'b0;
      if (!counting) begin
        if (sync[1] && !sync[2]) begin
          cnt      <= delay;
          counting <= 1'b1;
        end
      end else if (cnt == '0) begin
        counting <= 1'b0;
        start    <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
