// freq_ramp: linear ramp of the synthesized RF frequency.
//
// The Debuncher LLRF can ramp its synthesized frequency, e.g. to let the
// debunching cavities prepare reverse protons at a programmed momentum. A go
// pulse loads ftw_start; then every `interval` clocks the tuning word moves
// by ftw_step toward ftw_end (up or down), landing exactly on ftw_end. Each
// new word raises req until the DDS controller acks; if the controller is
// slower than the ramp, the request simply carries the latest word. busy is
// high from go until the end word has been handed over. The ramp itself follows
// the design description; its linear shape and parameters are this design's.
module freq_ramp #(
  parameter int FTW_W      = 32,
  parameter int INTERVAL_W = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  go,
  input  logic [FTW_W-1:0]      ftw_start,
  input  logic [FTW_W-1:0]      ftw_end,
  input  logic [FTW_W-1:0]      ftw_step,
  input  logic [INTERVAL_W-1:0] interval,
  output logic [FTW_W-1:0]      ftw,
  output logic                  req,
  input  logic                  ack,
  output logic                  busy
);
  logic                  active;
  logic [INTERVAL_W-1:0] tmr;
  logic [FTW_W-1:0]      gap;
  logic                  up;

  assign up   = ftw_end > ftw;
  assign gap = up ? ftw_end - ftw : ftw - ftw_end;
  assign busy = active || req;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      tmr    <= '0;
      ftw    <= '0;
      req    <= 1'b0;
    end else begin
      if (req && ack) req <= 1'b0;
      if (go) begin
        ftw    <= ftw_start;
        req    <= 1'b1;
        tmr    <= interval;
        active <= (ftw_start != ftw_end);
      end else if (active) begin
        if (tmr > 1) tmr <= tmr - 1'b1;
        else begin
          tmr <= interval;
          req <= 1'b1;
          if (gap <= ftw_step) begin
            ftw    <= ftw_end;
            active <= 1'b0;
          end else begin
            ftw <= up ? ftw + ftw_step : ftw - ftw_step;
          end
        end
      end
    end
  end
endmodule
