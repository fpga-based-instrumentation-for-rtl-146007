// isqrt: pipelined integer square root, y = floor(sqrt(x)).
//
// The restoring digit-by-digit method: each of the OUT_W stages brings down
// the next two radicand bits, tries to subtract (4*root + 1) from the partial
// remainder and appends the resulting root bit. One stage per clock, so a new
// radicand is accepted every clock and its root appears OUT_W clocks later,
// with the valid flag and a user tag carried alongside. The design
// description asks only for sqrt(I^2+Q^2); the method is this design's choice.
module isqrt #(
  parameter int IN_W  = 22,
  parameter int TAG_W = 2,
  localparam int OUT_W = IN_W / 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [OUT_W-1:0] y,
  output logic [TAG_W-1:0] out_tag
);
  // stage registers; index k holds the state after k stages
  logic [IN_W-1:0]  rad  [OUT_W+1];
  logic [OUT_W+1:0] rem  [OUT_W+1];
  logic [OUT_W-1:0] root [OUT_W+1];
  logic             vld  [OUT_W+1];
  logic [TAG_W-1:0] tag  [OUT_W+1];

  always_comb begin
    rad[0]  = x;
    rem[0]  = '0;
    root[0] = '0;
    vld[0]  = in_valid;
    tag[0]  = in_tag;
  end

  for (genvar k = 0; k < OUT_W; k++) begin : g_stage
    logic [OUT_W+1:0] r_next, trial;
    always_comb begin
      r_next = {rem[k][OUT_W-1:0], rad[k][IN_W-1 -: 2]};
      trial  = {root[k], 2'b01};
    end
    always_ff @(posedge clk) begin
      if (rst) vld[k+1] <= 1'b0;
      else     vld[k+1] <= vld[k];
      tag[k+1] <= tag[k];
      rad[k+1] <= rad[k] << 2;
      if (r_next >= trial) begin
        rem[k+1]  <= r_next - trial;
        root[k+1] <= {root[k][OUT_W-2:0], 1'b1};
      end else begin
        rem[k+1]  <= r_next;
        root[k+1] <= {root[k][OUT_W-2:0], 1'b0};
      end
    end
  end

  assign y         = root[OUT_W];
  assign out_valid = vld[OUT_W];
  assign out_tag   = tag[OUT_W];
endmodule
