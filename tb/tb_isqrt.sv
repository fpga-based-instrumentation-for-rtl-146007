// tb_isqrt: checks the pipelined square root against a reference computed by
// search, for random and edge-case radicands fed one per clock, and checks
// that each result appears exactly OUT_W clocks after its input.
module tb_isqrt;
  localparam int IN_W = 22, OUT_W = 11;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  logic [IN_W-1:0] x = '0;
  logic [1:0] in_tag = '0, out_tag;
  logic [OUT_W-1:0] y;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [IN_W-1:0] q_x [$];
  int              q_t [$];

  isqrt #(.IN_W(IN_W), .TAG_W(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int ref_sqrt(longint unsigned v);
    int r = 0;
    while (longint'(r + 1) * longint'(r + 1) <= v) r++;
    return r;
  endfunction

  always @(posedge clk) if (!rst && out_valid) begin
    logic [IN_W-1:0] xi;
    int t0;
    xi = q_x.pop_front();
    t0 = q_t.pop_front();
    checks++;
    if (y != OUT_W'(ref_sqrt(xi)) || out_tag != xi[1:0]) begin
      failures++;
      $display("FAIL sqrt(%0d) = %0d, expected %0d", xi, y, ref_sqrt(xi));
    end
    checks++;
    if (cycle - t0 != OUT_W) begin
      failures++;
      $display("FAIL latency %0d", cycle - t0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      logic [IN_W-1:0] v;
      case (i)
        0: v = '0;  1: v = 1;  2: v = 3;  3: v = 4;  4: v = '1;
        5: v = 22'd2093058;  6: v = 22'd1046529;  7: v = 22'd1046528;
        default: v = IN_W'($urandom);
      endcase
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0) || i < 8;
      x        = v;
      in_tag   = v[1:0];
      if (in_valid) begin
        q_x.push_back(v);
        q_t.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (q_x.size() != 0) begin failures++; $display("FAIL %0d results missing", q_x.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
