// tb_gtrc_hit_counter: checks the sparse-readout hit counter. Builds the
// serial stream a chain of front-end chips would send (flag, then 64 bits
// for chips with hits), for both controller sides and random chip counts,
// and compares the strip addresses, the hit count, and the number of cycles
// the read takes: nchips + 64 x (chips with hits).
module tb_gtrc_hit_counter;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic side = 0, start = 0, din = 0;
  logic [4:0] nchips = 0;
  logic busy, done, hit_valid;
  logic [10:0] hit_addr;
  logic [10:0] hit_count;
  gtrc_hit_counter #(.NUM_FE(25), .NCH(64)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  int got[$]; int done_cycle, cyc;
  always @(posedge clk) begin
    cyc++;
    if (hit_valid) got.push_back(int'(hit_addr));
    if (done) done_cycle = cyc;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      bit s[$]; int exp[$]; int n, nz, start_cyc;
      s = {}; exp = {}; got = {};
      side = t[0];
      n = (t == 3) ? 0 : 1 + ($urandom % 25);
      nchips = 5'(n);
      nz = 0;
      for (int k = 0; k < n; k++) begin
        logic [63:0] v;
        int chip;
        chip = side ? 24 - k : k;
        v = ($urandom % 2) ? 64'h0 : (64'h1 << ($urandom % 64)) | (64'h1 << ($urandom % 64));
        s.push_back(v != 0);
        if (v != 0) begin
          nz++;
          for (int c = 0; c < 64; c++) begin
            s.push_back(v[c]);
            if (v[c]) exp.push_back(chip * 64 + c);
          end
        end
      end
      start = 1;
      start_cyc = cyc;
      if (n == 0) @(negedge clk);
      foreach (s[i]) begin
        din = s[i];
        @(negedge clk);
        start = 0;
      end
      start = 0;
      din = 1;                       // bits after the last chip must be ignored
      repeat (3) @(negedge clk);
      din = 0;
      check(got.size() == exp.size(), $sformatf("hit count t=%0d %0d/%0d", t, got.size(), exp.size()));
      foreach (exp[i]) check(i < got.size() && got[i] == exp[i], "address");
      check(int'(hit_count) == exp.size() || n == 0, "hit_count");
      check(done_cycle - start_cyc == ((n == 0) ? 1 : n + 64 * nz) + 1,
            $sformatf("read length %0d vs %0d", done_cycle - start_cyc, n + 64 * nz));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
