// tb_frac_divider: random and edge-case ratios against floor(num*2^FRAC/den),
// with the done pulse checked to come FRAC + 1 clocks after start.
module tb_frac_divider;
  localparam int W = 18, FRAC = 8;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [W-1:0] num = '0, den = '0;
  logic [FRAC-1:0] q;
  int checks = 0, failures = 0;

  frac_divider #(.W(W), .FRAC(FRAC)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [W-1:0] n, input logic [W-1:0] d);
    int t, exp_q;
    @(negedge clk);
    num = n; den = d; start = 1;
    @(negedge clk);
    start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    if (d == 0 || n == d) exp_q = 2**FRAC - 1;
    else exp_q = int'((longint'(n) << FRAC) / longint'(d));
    checks++;
    if (q != FRAC'(exp_q)) begin failures++; $display("FAIL %0d/%0d q=%0d exp %0d", n, d, q, exp_q); end
    checks++;
    if (t != FRAC + 1) begin failures++; $display("FAIL latency %0d", t); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 100); run(1, 1); run(99, 100); run(1, 3); run(0, 0);
    run(18'h3FFFF, 18'h3FFFF); run(18'h1FFFF, 18'h3FFFF);
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom); b = W'($urandom);
      if (a > b) run(b, a); else run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
