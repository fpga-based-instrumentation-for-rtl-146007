// tb_capture_buffer: records two 256-sample records from an irregular sample
// stream and reads them back through the read port, checking every word,
// the done flag, that recording stops after 256 samples and that the read
// port has one clock of latency.
module tb_capture_buffer;
  localparam int DEPTH = 256;
  logic clk = 0, rst = 1, start = 0, din_valid = 0, capturing, done;
  logic [31:0] din = '0, rd_data;
  logic [7:0] rd_addr = '0;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  capture_buffer #(.DEPTH(DEPTH), .W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic record(input int seed);
    int k = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks++;
    if (!capturing || done) begin failures++; $display("FAIL not capturing after start"); end
    while (k < DEPTH + 10) begin
      @(negedge clk);
      din = 32'($urandom) ^ 32'(seed);
      din_valid = $urandom_range(0, 2) != 0;
      if (din_valid) begin
        if (k < DEPTH) model[k] = din;
        k++;
      end
    end
    @(negedge clk) din_valid = 0;
    checks++;
    if (!done || capturing) begin failures++; $display("FAIL done flag"); end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk) rd_addr = 8'(a);
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("FAIL word %0d %h exp %h", a, rd_data, model[a]); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    record(1);
    record(32'h5a5a0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
