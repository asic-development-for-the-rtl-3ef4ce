// tb_gtrc: checks a whole GTRC controller against a modelled chain of
// front-end chips. The model decodes the controller's command frames and,
// after a read-event, puts out the serial stream real chips would (flag,
// then 64 channel bits for chips with hits), the flag one edge after the
// edge that sampled the frame's last bit. For each event the test makes a Fast-OR pulse of known length,
// acknowledges the trigger, hands over the token and decodes the record:
// layer id, hit count, overflow, TOT and every strip address. Runs as a
// left-end and a right-end controller.
module tb_gtrc;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic side = 0, trig_en = 1;
  logic [4:0] nchips = 5'd6;
  logic [3:0] layer_id = 4'd9;
  logic cmd_in = 0, tack_in = 0, trig_out, busy, token_in = 0, data_out, data_in = 0, token_out;
  logic fe_cmd, fe_tack, fe_data = 0, fe_trig = 0;

  gtrc #(.NUM_FE(25)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // front-end chain model
  bit stream[$];
  int fstate = 0, fcnt = 0; logic [7:0] hdr = 0; bit reading = 0;
  int n_read = 0, n_end = 0, n_clear = 0, n_tack = 0;
  always @(posedge clk) begin
    if (fe_tack && rst_n) n_tack++;
    if (reading) fe_data <= (stream.size() != 0) ? stream.pop_front() : 1'b0;
    case (fstate)
      0: if (fe_cmd) begin fstate = 1; fcnt = 0; end
      default: begin
        hdr = {hdr[6:0], fe_cmd}; fcnt++;
        if (fcnt == 8) begin
          fstate = 0;
          if (hdr[7:5] == CMD_READ_EVENT) begin
            n_read++; reading = 1;     // the flag goes out at the next edge
          end
          if (hdr[7:5] == CMD_END_READ) begin n_end++; reading = 0; end
          if (hdr[7:5] == CMD_CLEAR_EVENT) n_clear++;
        end
      end
    endcase
  end

  task automatic get(int n, output int v);
    v = 0;
    for (int i = 0; i < n; i++) begin @(negedge clk); v = (v << 1) | int'(data_out); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 8; t++) begin
      int exp[$]; int v, g, len, nz;
      side = t[0];
      trig_en = (t != 4);
      exp = {};
      stream = {};
      nz = 0;
      for (int k = 0; k < int'(nchips); k++) begin
        logic [63:0] p;
        int chip;
        chip = side ? 24 - k : k;
        p = (k == 2) ? '0 : (64'h1 << ($urandom % 64)) | (64'h1 << ($urandom % 64));
        if (t == 6) p = '1;                         // 384 hits: overflow
        stream.push_back(p != 0);
        if (p != 0) begin
          nz++;
          for (int c = 0; c < 64; c++) begin
            stream.push_back(p[c]);
            if (p[c]) exp.push_back(chip * 64 + c);
          end
        end
      end
      // Fast-OR pulse with the acknowledge in the middle
      len = 5 + t;
      fe_trig = 1;
      for (int k = 0; k < len; k++) begin
        #1 check(trig_out == trig_en, "trigger gate");
        if (k == 3) tack_in = 1;
        @(negedge clk);
        tack_in = 0;
      end
      fe_trig = 0;
      g = 0;
      while (busy && g < 5000) begin @(negedge clk); g++; end
      check(n_read == t + 1 && n_end == t + 1 && n_clear == t + 1 && n_tack == t + 1,
            $sformatf("one read, end and clear per event (t=%0d read=%0d end=%0d clear=%0d tack=%0d)", t, n_read, n_end, n_clear, n_tack));
      token_in = 1; @(negedge clk); token_in = 0;
      g = 0;
      while (!data_out && g < 1000) begin @(negedge clk); g++; end
      get(LAYER_W, v); check(v == 9, "layer");
      get(CNT_W, v);   check(v == (exp.size() > 64 ? 64 : exp.size()), $sformatf("count %0d", v));
      get(1, v);       check(v == (exp.size() > 64 ? 1 : 0), "overflow");
      get(TOT_W, v);   check(v == (trig_en ? len : 0), $sformatf("tot %0d vs %0d", v, len));
      for (int i = 0; i < (exp.size() > 64 ? 64 : exp.size()); i++) begin
        get(STRIP_W, v); check(v == exp[i], $sformatf("address %0d vs %0d", v, exp[i]));
      end
      g = 0;
      while (!token_out && g < 10) begin @(negedge clk); g++; end
      check(token_out, "token passed");
      repeat (3) @(negedge clk);
    end
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
