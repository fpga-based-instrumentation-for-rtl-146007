// frac_divider: sequential restoring divider for a ratio below one.
//
// Given num <= den it returns q = floor(num * 2^FRAC / den), one quotient bit
// per clock: start loads the operands, busy is high for FRAC clocks and done
// pulses in the clock after the last bit, with q valid from then on. If num
// equals den (or both are zero) q saturates at all ones. The phase meter uses
// it for the ratio of the smaller to the larger of |I| and |Q|.
module frac_divider #(
  parameter int W    = 18,
  parameter int FRAC = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [W-1:0]    num,
  input  logic [W-1:0]    den,
  output logic [FRAC-1:0] q,
  output logic            busy,
  output logic            done
);
  logic [W-1:0]                rem;
  logic [W-1:0]                d;
  logic [$clog2(FRAC+1)-1:0]   n;
  logic [W:0]                  shifted;

  assign shifted = {rem, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      n    <= '0;
      rem  <= '0;
      d    <= '0;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem  <= num;
        d    <= den;
        n    <= ($clog2(FRAC+1))'(FRAC);
        busy <= 1'b1;
      end else if (busy) begin
        if (shifted >= {1'b0, d}) begin
          rem <= W'(shifted - {1'b0, d});
          q   <= {q[FRAC-2:0], 1'b1};
        end else begin
          rem <= W'(shifted);
          q   <= {q[FRAC-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
