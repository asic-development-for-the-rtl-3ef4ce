// tb_gtrc_tot: checks the trigger gate and time-over-threshold counter.
// Random pulse lengths, including ones past saturation, with the gate open
// and closed: the prompt trigger must follow the input only when open, and
// each pulse must report its length in cycles one cycle after it ends.
module tb_gtrc_tot;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic trig_in = 0, trig_en = 1, trig_out, tot_valid;
  logic [7:0] tot;
  gtrc_tot dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  int nvalid; logic [7:0] last;
  always @(posedge clk) if (tot_valid) begin nvalid++; last = tot; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      int len;
      len = (t == 5) ? 300 : 1 + ($urandom % 40);
      trig_en = (t % 4 != 3);
      nvalid = 0;
      trig_in = 1;
      for (int k = 0; k < len; k++) begin
        #1 check(trig_out == trig_en, "gate");
        @(negedge clk);
      end
      trig_in = 0;
      @(negedge clk);
      @(negedge clk);
      check(nvalid == (trig_en ? 1 : 0), "one TOT per pulse");
      if (trig_en) check(int'(last) == (len > 255 ? 255 : len), $sformatf("tot %0d len %0d", last, len));
      repeat (3) @(negedge clk);
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
