// phase_meter: phase of a 53 MHz RF input sampled at 4/7 of the RF frequency.
//
// At that sampling rate the carrier advances 7/4 of a turn, i.e. -90 degrees,
// from one sample to the next, so consecutive samples of A*cos(wt + phi) are
// I, Q, -I, -Q with I = A*cos(phi) and Q = A*sin(phi). The meter forms
// I = s0 - s2 and Q = s1 - s3 for each group of four samples (the difference
// also cancels the ADC offset), sums ACC_CYCLES groups, and then computes
// phi = atan2(Q, I): a divider gives the ratio of the smaller to the larger
// magnitude, a 2^LUT_BITS-entry arctangent table turns it into an angle
// between 0 and 45 degrees, and the signs and the comparison unfold it to the
// full circle. phase is an unsigned fraction of a turn (2^PHASE_W = 360 deg).
//
// Timing: a sync pulse (in a clock without a sample) restarts the count so
// that the next sample is taken as an I sample. A result follows every
// 4*ACC_CYCLES samples, LUT_BITS + 4 clocks after the last sample of a
// block, marked by phase_valid. Sampling at 4/7 of the RF, alternate I and Q
// samples, a divider and an arctangent lookup follow the design description; the accumulation, table size and word widths are this
// design's choices. The table entries are atan((k + 0.5) / 2^LUT_BITS),
// computed when the design is elaborated.
module phase_meter #(
  parameter int ADC_W      = 12,
  parameter int ACC_CYCLES = 16,
  parameter int LUT_BITS   = 8,
  parameter int PHASE_W    = 16,
  localparam int ACC_W     = ADC_W + 1 + $clog2(ACC_CYCLES)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ADC_W-1:0]  adc,
  input  logic                     valid,
  input  logic                     sync,
  output logic [PHASE_W-1:0]       phase,
  output logic                     phase_valid,
  output logic signed [ACC_W-1:0]  i_sum,
  output logic signed [ACC_W-1:0]  q_sum
);
  typedef logic [PHASE_W-1:0] lut_t [2**LUT_BITS];

  function automatic lut_t make_lut();
    lut_t t;
    for (int k = 0; k < 2**LUT_BITS; k++)
      t[k] = PHASE_W'($rtoi($atan((real'(k) + 0.5) / real'(2**LUT_BITS))
                            / (2.0 * 3.14159265358979) * real'(2.0**PHASE_W) + 0.5));
    return t;
  endfunction
  localparam lut_t ATAN_LUT = make_lut();

  // ---- accumulation of I and Q ----
  logic [1:0]                      idx;
  logic [$clog2(ACC_CYCLES)-1:0]   grp;
  logic signed [ACC_W-1:0]         acc_i, acc_q;
  logic                            blk_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      grp      <= '0;
      acc_i    <= '0;
      acc_q    <= '0;
      i_sum    <= '0;
      q_sum    <= '0;
      blk_done <= 1'b0;
    end else begin
      blk_done <= 1'b0;
      if (sync) begin
        idx   <= '0;
        grp   <= '0;
        acc_i <= '0;
        acc_q <= '0;
      end else if (valid) begin
        unique case (idx)
          2'd0: acc_i <= acc_i + ACC_W'(adc);
          2'd1: acc_q <= acc_q + ACC_W'(adc);
          2'd2: acc_i <= acc_i - ACC_W'(adc);
          2'd3: acc_q <= acc_q - ACC_W'(adc);
        endcase
        idx <= idx + 1'b1;
        if (idx == 2'd3) begin
          grp <= grp + 1'b1;
          if (grp == ($clog2(ACC_CYCLES))'(ACC_CYCLES - 1)) begin
            i_sum    <= acc_i;
            q_sum    <= acc_q - ACC_W'(adc);
            acc_i    <= '0;
            acc_q    <= '0;
            blk_done <= 1'b1;
          end
        end
      end
    end
  end

  // ---- ratio and octant ----
  logic [ACC_W-1:0] ai, aq;
  logic             neg_i, neg_q, swap;
  logic             div_done;
  logic [LUT_BITS-1:0] ratio;

  always_ff @(posedge clk) begin
    if (blk_done) begin
      neg_i <= i_sum < 0;
      neg_q <= q_sum < 0;
      ai    <= (i_sum < 0) ? ACC_W'(-i_sum) : ACC_W'(i_sum);
      aq    <= (q_sum < 0) ? ACC_W'(-q_sum) : ACC_W'(q_sum);
    end
  end
  assign swap = aq > ai;

  logic div_start, div_busy;
  always_ff @(posedge clk) div_start <= rst ? 1'b0 : blk_done;

  frac_divider #(.W(ACC_W), .FRAC(LUT_BITS)) u_div (
    .clk, .rst, .start(div_start),
    .num(swap ? ai : aq), .den(swap ? aq : ai),
    .q(ratio), .busy(div_busy), .done(div_done)
  );

  // a new block never arrives while the previous ratio is being divided
  a_div_free: assert property (@(posedge clk) disable iff (rst) div_start |-> !div_busy);

  // ---- arctangent and unfolding ----
  localparam logic [PHASE_W-1:0] QUARTER = PHASE_W'(2**(PHASE_W-2));
  localparam logic [PHASE_W-1:0] HALF    = PHASE_W'(2**(PHASE_W-1));
  logic [PHASE_W-1:0] a, th1;
  always_comb begin
    a   = ATAN_LUT[ratio];
    th1 = swap ? QUARTER - a : a;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= '0;
      phase_valid <= 1'b0;
    end else begin
      phase_valid <= div_done;
      if (div_done) begin
        unique case ({neg_i, neg_q})
          2'b00: phase <= th1;
          2'b10: phase <= HALF - th1;
          2'b11: phase <= HALF + th1;
          2'b01: phase <= -th1;
        endcase
      end
    end
  end
endmodule
