// tb_sync_fifo: self-checking test of the FIFO used for the GTFE64 event
// buffer and the GTRC TOT FIFO. Random pushes and pops at the default
// depth of 8 against a queue model: head, empty, full, count, ignored
// push when full and pop when empty, simultaneous push/pop, clear.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic clear = 0, push = 0, pop = 0;
  logic [63:0] din = '0, dout;
  logic empty, full;
  logic [3:0] count;

  sync_fifo #(.WIDTH(64), .DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [63:0] q[$];
  int n_full = 0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      check(count == 4'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == 8), "full");
      if (q.size() != 0) check(dout == q[0], "head");
      if (full) n_full++;
      push = ($urandom % 100) < ((t / 250) % 2 ? 70 : 35);
      pop  = ($urandom % 100) < 50;
      din  = {$urandom, $urandom};
      clear = (t == 1500);
      @(negedge clk);
      if (t == 1500) q = {};
      else begin
        logic was_full, was_empty;
        was_full = (q.size() == 8); was_empty = (q.size() == 0);
        if (pop && !was_empty) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    check(n_full > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
