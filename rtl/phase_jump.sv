// phase_jump: the Debuncher/Main Injector phase jump.
//
// The Debuncher RF source runs free at its own frequency instead of locking to
// the Main Injector RF. The phase meter continuously measures the MI RF phase
// against the board's 53.1 MHz reference; a timing trigger that arrives
// 200 us before MI extraction (before the Debuncher cavities are energized)
// makes this block take the most recent measurement, add a programmable
// offset and ask the DDS controller to load the sum as the synthesizer's
// phase offset word, so the synthesized waveform steps into phase with the
// incoming beam.
//
// Interface: jump_trig is asynchronous (two-flop synchronizer, rising edge).
// req stays high with pow until ack; pow is the top POW_W bits of the 16-bit
// phase sum, the resolution of the AD9953 phase register; jump_phase keeps
// the full sum for read-back. A trigger that
// comes before any valid measurement sets missed and sends nothing. The
// measure-then-jump scheme follows the design description; the offset
// register, the missed flag and the handshake are this design's own.
module phase_jump #(
  parameter int PHASE_W = 16,
  parameter int POW_W   = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               jump_trig,
  input  logic [PHASE_W-1:0] mi_phase,
  input  logic               mi_phase_valid,
  input  logic [PHASE_W-1:0] offset,
  output logic               req,
  output logic [POW_W-1:0]   pow,
  input  logic               ack,
  output logic [PHASE_W-1:0] jump_phase,
  output logic               jumped,
  output logic               missed
);
  logic [2:0]         sync;
  logic               have_phase;
  logic [PHASE_W-1:0] last_phase, target;

  assign target = last_phase + offset;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= '0;
      have_phase <= 1'b0;
      last_phase <= '0;
      req        <= 1'b0;
      pow        <= '0;
      jump_phase <= '0;
      jumped     <= 1'b0;
      missed     <= 1'b0;
    end else begin
      sync   <= {sync[1:0], jump_trig};
      jumped <= 1'b0;
      if (mi_phase_valid) begin
        last_phase <= mi_phase;
        have_phase <= 1'b1;
      end
      if (req && ack) req <= 1'b0;
      if (sync[1] && !sync[2]) begin
        if (have_phase) begin
          pow    <= target[PHASE_W-1 -: POW_W];
          jump_phase <= target;
          req    <= 1'b1;
          jumped <= 1'b1;
          missed <= 1'b0;
        end else begin
          missed <= 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst) req && !ack |=> req);
endmodule
