// bpm_plate: signal processing for one BPM plate of the downconverter board.
//
// The plate's 53 MHz signal arrives demodulated to baseband as an in-phase and
// a quadrature sample from a 10-bit dual ADC. Per sample the channel subtracts
// the programmed pedestals, forms I^2 + Q^2, takes the integer square root and,
// inside the integration window, adds the magnitude to a running sum. The
// window opens at start and covers the next N_SAMPLES samples: 32 samples at
// 20 MSPS span the 1.6 us bunch train. When the last of them leaves the
// pipeline, sum holds the result and done pulses for one clock.
//
// Timing: done rises ADC_W + 4 clocks (14 at the defaults) after the clock
// edge that takes the last window sample;
// one sample per clock at most. ADC codes are taken as offset binary (0..1023)
// and pedestals as unsigned codes. Pedestal subtraction, magnitude and
// integration follow the design description; widths, the pipeline and the
// window rule are this design's choices.
module bpm_plate #(
  parameter int ADC_W     = 10,
  parameter int N_SAMPLES = 32,
  localparam int MAG_W    = ADC_W + 1,
  localparam int SUM_W    = MAG_W + $clog2(N_SAMPLES)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ADC_W-1:0] i_in,
  input  logic [ADC_W-1:0] q_in,
  input  logic             valid,
  input  logic [ADC_W-1:0] ped_i,
  input  logic [ADC_W-1:0] ped_q,
  input  logic             start,
  output logic [SUM_W-1:0] sum,
  output logic             done
);
  localparam int SQ_W = 2 * MAG_W;  // even width for the square root

  // ---- window counter: tags incoming samples ----
  logic [$clog2(N_SAMPLES+1)-1:0] left;
  logic in_win, last;
  always_ff @(posedge clk) begin
    if (rst) left <= '0;
    else if (start) left <= ($clog2(N_SAMPLES+1))'(N_SAMPLES);
    else if (valid && left != '0) left <= left - 1'b1;
  end
  assign in_win = valid && (left != '0) && !start;
  assign last   = in_win && (left == 1);

  // ---- stage 1: pedestal subtraction ----
  logic signed [ADC_W:0] di, dq;
  logic                  v1;
  logic [1:0]            t1;
  always_ff @(posedge clk) begin
    di <= $signed({1'b0, i_in}) - $signed({1'b0, ped_i});
    dq <= $signed({1'b0, q_in}) - $signed({1'b0, ped_q});
    v1 <= rst ? 1'b0 : valid;
    t1 <= {last, in_win};
  end

  // ---- stage 2: I^2 + Q^2 ----
  logic [SQ_W-1:0]        sq;
  logic signed [SQ_W-1:0] di_w, dq_w;
  logic                   v2;
  logic [1:0]             t2;
  assign di_w = SQ_W'(di);
  assign dq_w = SQ_W'(dq);
  always_ff @(posedge clk) begin
    sq <= SQ_W'(unsigned'(di_w * di_w)) + SQ_W'(unsigned'(dq_w * dq_w));
    v2 <= rst ? 1'b0 : v1;
    t2 <= t1;
  end

  // ---- stages 3..: square root ----
  logic [MAG_W-1:0] mag;
  logic             v3;
  logic [1:0]       t3;
  isqrt #(.IN_W(SQ_W), .TAG_W(2)) u_sqrt (
    .clk, .rst, .in_valid(v2), .x(sq), .in_tag(t2),
    .out_valid(v3), .y(mag), .out_tag(t3)
  );

  // ---- integration ----
  logic [SUM_W-1:0] acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      sum  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) acc <= '0;
      else if (v3 && t3[0]) begin
        if (t3[1]) begin
          sum  <= acc + SUM_W'(mag);
          acc  <= '0;
          done <= 1'b1;
        end else begin
          acc <= acc + SUM_W'(mag);
        end
      end
    end
  end
endmodule
