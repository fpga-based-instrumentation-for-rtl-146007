// awg: orbit-synchronized arbitrary waveform generator for the diagnostic DAC.
//
// The RF board's 10-bit DAC (an AD9751) plays a waveform that the host writes
// into a DEPTH-word RAM over the bus, for example a pulse shape that
// precompensates amplifier distortion in the barrier-bucket RF system. Each
// orbit marker restarts playback at word 0; the generator then outputs one
// word per clock for `length` words (0 means DEPTH) and after that holds the
// mid-scale code until the next marker. A marker during playback restarts it.
//
// Timing: orbit_sync is asynchronous (two-flop synchronizer, rising edge);
// word 0 reaches dac_data 4 clocks after the marker is first sampled high.
// Bus ports: a write port, and a read port with rd_data one clock after
// rd_addr. The DAC, its width
// and the orbit-synchronized use follow the design description; the RAM depth,
// the playback rule and the idle code are this design's choices.
module awg #(
  parameter int DEPTH = 1024,
  parameter int DAC_W = 10,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             orbit_sync,
  input  logic [AW:0]      length,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [DAC_W-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [DAC_W-1:0] rd_data,
  output logic [DAC_W-1:0] dac_data,
  output logic             playing,
  output logic [15:0]      n_orbits
);
  localparam logic [DAC_W-1:0] MID = DAC_W'(1 << (DAC_W - 1));

  logic [DAC_W-1:0] mem [DEPTH];
  logic [2:0]       sync;
  logic [AW:0]      rptr, last;
  logic             play_d;
  logic [DAC_W-1:0] q;

  assign last = (length == '0) ? (AW+1)'(DEPTH) : length;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
    q       <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= '0;
      rptr     <= '0;
      playing  <= 1'b0;
      play_d   <= 1'b0;
      dac_data <= MID;
      n_orbits <= '0;
    end else begin
      sync   <= {sync[1:0], orbit_sync};
      play_d <= playing;
      if (sync[1] && !sync[2]) begin
        rptr     <= '0;
        playing  <= 1'b1;
        n_orbits <= n_orbits + 1'b1;
      end else if (playing) begin
        if (rptr == last - 1'b1) playing <= 1'b0;
        else rptr <= rptr + 1'b1;
      end
      dac_data <= play_d ? q : MID;
    end
  end
endmodule
