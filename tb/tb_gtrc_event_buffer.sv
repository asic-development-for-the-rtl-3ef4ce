// tb_gtrc_event_buffer: checks one GTRC event buffer: appending addresses,
// read-back by index, overflow past 64 entries, commit with TOT, release.
module tb_gtrc_event_buffer;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic start = 0, wr_en = 0, commit = 0, release_buf = 0;
  logic [10:0] wr_data = 0, rd_data;
  logic [7:0] commit_tot = 0, tot;
  logic [5:0] rd_idx = 0;
  logic [6:0] count;
  logic overflow, full;
  gtrc_event_buffer #(.DEPTH(64)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      int n; int v[$];
      v = {};
      n = (t == 2) ? 90 : (t == 4) ? 0 : $urandom % 64;
      start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        wr_en = 1; wr_data = 11'($urandom % 1600); v.push_back(int'(wr_data));
        @(negedge clk);
      end
      wr_en = 0;
      commit = 1; commit_tot = 8'(t * 7 + 1); @(negedge clk); commit = 0;
      check(full, "full after commit");
      check(int'(count) == (n > 64 ? 64 : n), "count");
      check(overflow == (n > 64), "overflow");
      check(tot == 8'(t * 7 + 1), "tot");
      for (int i = 0; i < (n > 64 ? 64 : n); i++) begin
        rd_idx = 6'(i); #1;
        check(int'(rd_data) == v[i], "entry");
      end
      @(negedge clk);
      release_buf = 1; @(negedge clk); release_buf = 0;
      check(!full, $sformatf("released t=%0d n=%0d", t, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
