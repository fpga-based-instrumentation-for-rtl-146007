// tclk_decoder: decodes the accelerator's serial clock-event line.
//
// Every service building carries the site's timing events on one line, a
// 10 MHz biphase-mark signal: the level changes at every bit-cell boundary,
// and a 1 has a second change in mid-cell while a 0 has none. The line idles
// at 1s; an event is a start bit 0, eight data bits (least significant first)
// and an odd parity bit. This block times the intervals between level changes
// with the 53.1 MHz clock (a cell is 5.3 clocks): an interval shorter than
// SHORT_MAX clocks is half a cell, so two of them make a 1; a longer one is a
// whole cell, a 0. A long interval after an unpaired half cell realigns the
// pairing (this only happens in the idle 1s before a start bit). Intervals
// longer than LONG_MAX clocks, or a parity error, abandon the frame.
//
// Interface: tclk is asynchronous (two-flop synchronizer). When a frame with
// correct parity ends, event_valid pulses for one clock with event_code;
// parity_err pulses instead if the parity is wrong. Timing: event_valid
// follows the last transition of the parity bit by 4 clocks. The need to
// decode clock events comes from the design description; the line format
// (rate, biphase-mark code, frame) is taken from the usual form of such
// timing links and is this design's assumption.
module tclk_decoder #(
  parameter int SHORT_MAX = 4,   // intervals below this are half cells
  parameter int LONG_MAX  = 8    // intervals above this break the frame
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tclk,
  output logic       event_valid,
  output logic [7:0] event_code,
  output logic       parity_err
);
  logic [2:0] sync;
  logic [3:0] cnt;
  logic       half;      // one half-cell interval seen, waiting for its pair
  logic       in_frame;
  logic [3:0] nbits;     // data and parity bits received
  logic [7:0] sh;        // data bits, shifted in LSB first
  logic       edge_seen, bit_valid, bit_val, broken;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[1:0], tclk};
  end
  assign edge_seen = sync[2] != sync[1];

  // interval timing and biphase-mark pairing
  always_comb begin
    bit_valid = 1'b0;
    bit_val   = 1'b0;
    broken    = 1'b0;
    if (edge_seen) begin
      if (cnt < 4'(SHORT_MAX)) begin
        if (half) begin bit_valid = 1'b1; bit_val = 1'b1; end
      end else if (cnt <= 4'(LONG_MAX)) begin
        bit_valid = 1'b1;
        bit_val   = 1'b0;
      end else begin
        broken = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      half        <= 1'b0;
      in_frame    <= 1'b0;
      nbits       <= '0;
      sh          <= '0;
      event_valid <= 1'b0;
      event_code  <= '0;
      parity_err  <= 1'b0;
    end else begin
      event_valid <= 1'b0;
      parity_err  <= 1'b0;
      if (edge_seen) cnt <= 4'd1;
      else if (cnt != '1) cnt <= cnt + 1'b1;
      if (edge_seen) begin
        if (cnt < 4'(SHORT_MAX)) half <= !half;
        else                     half <= 1'b0;
      end
      if (broken || (!edge_seen && cnt == '1)) begin
        in_frame <= 1'b0;
      end else if (bit_valid) begin
        if (!in_frame) begin
          if (!bit_val) begin           // start bit
            in_frame <= 1'b1;
            nbits    <= '0;
          end
        end else begin
          nbits <= nbits + 1'b1;
          if (nbits != 4'd8) sh <= {bit_val, sh[7:1]};
          else begin                    // parity bit
            in_frame <= 1'b0;
            if (^{bit_val, sh}) begin
              event_valid <= 1'b1;
              event_code  <= sh;
            end else begin
              parity_err  <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
