// tb_abus_arbiter: two behavioural masters issue random reads and writes
// concurrently to disjoint address halves of one memory model through the
// arbiter. Every read must return what that master wrote, the memory must
// see exactly the sum of both masters' accesses, and when both ask in the
// same clock the CPU-side master (m0) must be served first.
module tb_abus_arbiter;
  import ap_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  abus_if b0 ();
  abus_if b1 ();
  abus_if bs ();
  abus_arbiter dut (.clk, .rst, .m0(b0), .m1(b1), .s(bs));
  abus_master_model mm0 (.clk, .m(b0));
  abus_master_model mm1 (.clk, .m(b1));
  abus_mem_model #(.MAX_WAIT(2)) mem (.clk, .rst, .s(bs));
  always #5 clk = ~clk;

  task automatic traffic(input int id, input int n);
    data_t model [addr_t];
    for (int k = 0; k < n; k++) begin
      addr_t a;
      data_t v, r;
      int c;
      a = {id[0], 12'd0, 3'($urandom)};
      if ($urandom_range(0, 1) || !model.exists(a)) begin
        v = $urandom;
        model[a] = v;
        if (id == 0) mm0.write(a, v, c); else mm1.write(a, v, c);
      end else begin
        if (id == 0) mm0.read(a, r, c); else mm1.read(a, r, c);
        checks++;
        if (r != model[a]) begin failures++; $display("FAIL master %0d read %h = %h exp %h", id, a, r, model[a]); end
      end
    end
  endtask

  initial begin
    int c0, c1;
    data_t r;
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      traffic(0, 150);
      traffic(1, 150);
    join
    checks++;
    if (mem.n_reads + mem.n_writes != 300) begin failures++; $display("FAIL %0d accesses", mem.n_reads + mem.n_writes); end
    // simultaneous requests: m0 first
    fork
      mm0.read(16'h0001, r, c0);
      mm1.read(16'h8001, r, c1);
    join
    checks++;
    if (!(c0 < c1)) begin failures++; $display("FAIL priority: m0 %0d clocks, m1 %0d", c0, c1); end
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
