// bpm_processor: the four plate channels of one BPM downconverter card, two
// BPMs with two plates each (inputs 0A, 0B, 1A, 1B).
//
// All plates share the sample strobe and one integration-window start, so
// their results are ready in the same clock; the processor then latches them
// and raises done until the next start. Each plate has its own pedestal pair.
// The plate count follows the design description; the shared window and the
// done flag are this design's choice.
module bpm_processor #(
  parameter int N_PLATES  = 4,
  parameter int ADC_W     = 10,
  parameter int N_SAMPLES = 32,
  localparam int SUM_W    = ADC_W + 1 + $clog2(N_SAMPLES)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] i_in  [N_PLATES],
  input  logic [ADC_W-1:0] q_in  [N_PLATES],
  input  logic             valid,
  input  logic [ADC_W-1:0] ped_i [N_PLATES],
  input  logic [ADC_W-1:0] ped_q [N_PLATES],
  input  logic             start,
  output logic [SUM_W-1:0] sums  [N_PLATES],
  output logic             done
);
  logic [SUM_W-1:0] s   [N_PLATES];
  logic             d   [N_PLATES];

  for (genvar p = 0; p < N_PLATES; p++) begin : g_plate
    bpm_plate #(.ADC_W(ADC_W), .N_SAMPLES(N_SAMPLES)) u_plate (
      .clk, .rst, .i_in(i_in[p]), .q_in(q_in[p]), .valid,
      .ped_i(ped_i[p]), .ped_q(ped_q[p]), .start,
      .sum(s[p]), .done(d[p])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done <= 1'b0;
      for (int p = 0; p < N_PLATES; p++) sums[p] <= '0;
    end else begin
      if (start) done <= 1'b0;
      else if (d[0]) begin
        done <= 1'b1;
        for (int p = 0; p < N_PLATES; p++) sums[p] <= s[p];
      end
    end
  end
endmodule
