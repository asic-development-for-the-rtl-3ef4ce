// tb_glast_layer: checks one tracker layer (6 chips, two controllers).
// Loads each chip's control register from the left controller's command
// line, reading the previous contents back on the chip's control-register
// output; then for several readout splits, including one that leaves a
// "dead" chip to neither controller, applies random strip charges,
// acknowledges the trigger and decodes both controllers' records, checking
// every strip address, the counts and the TOT of the Fast-OR pulse.
module tb_glast_layer;
  import glast_pkg::*;
  localparam int F = 6;
  localparam int H = 10;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic [F-1:0][NUM_CH-1:0][Q_W-1:0] charge;
  logic [Q_W-1:0] q [F][NUM_CH];
  for (genvar i = 0; i < F; i++) begin : g_q
    for (genvar c = 0; c < NUM_CH; c++) begin : g_c
      assign charge[i][c] = q[i][c];
    end
  end
  logic [3:0] layer_id = 4'd3;
  logic [1:0][4:0] nchips;
  logic [1:0] trig_en = 2'b11, cmd_in = 0, tack_in = 0, trig_out, busy, token_in = 0,
              data_out, data_in = 0, token_out;
  logic [F-1:0] ctrl_reg_out;

  glast_layer #(.NUM_FE(F)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  ctrl_reg_t cfg [F];
  ctrl_reg_t fe_ctrl [F];
  logic [F-1:0] fe_se_a;
  for (genvar c = 0; c < F; c++) begin : g_probe
    assign fe_ctrl[c] = dut.g_fe[c].u_fe.ctrl;
    assign fe_se_a[c] = dut.g_fe[c].u_fe.se_a;
  end

  // serial load, checking read-back of the previous value
  task automatic load_chk(int chip, ctrl_reg_t v, ctrl_reg_t old);
    logic [8:0] h;
    h = {1'b1, CMD_LOAD_CTRL, 5'(chip)};
    for (int i = 8; i >= 0; i--) begin cmd_in[0] = h[i]; @(negedge clk); end
    for (int i = CTRL_W - 1; i >= 0; i--) begin cmd_in[0] = v[i]; @(negedge clk); end
    cmd_in[0] = 0;
    repeat (4) @(negedge clk);
    check(fe_ctrl[chip] == v, $sformatf("chip %0d loaded", chip));
    // the old contents left through ctrl_reg_out during the load; checked
    // by the monitor below
    check(mon_ok[chip], $sformatf("chip %0d read-back", chip));
  endtask

  // monitor of the read-back stream: record bits shifted out per chip
  bit mon_ok [F];
  logic [CTRL_W-1:0] exp_back [F];
  int  mon_n [F];
  always @(posedge clk) begin
    for (int c = 0; c < F; c++)
      if (fe_se_a[c]) begin
        if (ctrl_reg_out[c] != exp_back[c][CTRL_W-1 - mon_n[c]]) mon_ok[c] = 0;
        mon_n[c]++;
      end
  end

  task automatic configure(int split, int dead);
    for (int i = 0; i < F; i++) begin
      ctrl_reg_t c;
      bit right;
      right = (i >= split);
      c = '0;
      c.dec_sel = right; c.read_right = right;
      c.trig_left_en = !right && i != dead; c.trig_right_en = right && i != dead;
      c.thr_dac = 7'd15;
      c.data_mask = '1; c.trig_mask = '1;
      exp_back[i] = cfg[i]; mon_ok[i] = 1; mon_n[i] = 0;
      load_chk(i, c, cfg[i]);
      cfg[i] = c;
    end
    nchips[0] = 5'(dead >= 0 ? dead : split);
    nchips[1] = 5'(dead >= 0 ? F - 1 - dead : F - split);
  endtask

  task automatic get(int s, int n, output int v);
    v = 0;
    for (int i = 0; i < n; i++) begin @(negedge clk); v = (v << 1) | int'(data_out[s]); end
  endtask

  initial begin
    for (int i = 0; i < F; i++) for (int ch = 0; ch < NUM_CH; ch++) q[i][ch] = '0;
    nchips = '0;
    for (int i = 0; i < F; i++) cfg[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 4; t++) begin
      int split, dead, g;
      int exp [2][$];
      split = (t == 0) ? F : (t == 1) ? 0 : 3;
      dead  = (t == 3) ? 2 : -1;
      configure(split, dead);
      for (int i = 0; i < F; i++)
        for (int ch = 0; ch < NUM_CH; ch++)
          q[i][ch] = (($urandom % 8) == 0 || ch == 0) ? 12'd150 : 12'd20;
      for (int s = 0; s < 2; s++) begin
        exp[s] = {};
        for (int k = 0; k < int'(nchips[s]); k++) begin
          int i;
          i = s ? F - 1 - k : k;
          for (int ch = 0; ch < NUM_CH; ch++) if (q[i][ch] == 12'd150) exp[s].push_back(i * 64 + ch);
        end
      end
      repeat (3) @(negedge clk);
      tack_in = 2'b11; @(negedge clk); tack_in = 0;
      repeat (H - 4) @(negedge clk);
      for (int i = 0; i < F; i++) for (int ch = 0; ch < NUM_CH; ch++) q[i][ch] = '0;
      g = 0;
      while (busy != 0 && g < 5000) begin @(negedge clk); g++; end
      for (int s = 0; s < 2; s++) begin
        int v, n;
        token_in[s] = 1; @(negedge clk); token_in[s] = 0;
        g = 0;
        while (!data_out[s] && g < 1000) begin @(negedge clk); g++; end
        get(s, LAYER_W, v); check(v == 3, "layer id");
        get(s, CNT_W, n);
        check(n == (exp[s].size() > 64 ? 64 : exp[s].size()), $sformatf("t%0d side %0d count %0d/%0d", t, s, n, exp[s].size()));
        get(s, 1, v); check(v == (exp[s].size() > 64), "overflow");
        get(s, TOT_W, v); check(v == (nchips[s] != 0 ? H : 0), $sformatf("t%0d side %0d tot %0d", t, s, v));
        for (int j = 0; j < n; j++) begin
          get(s, STRIP_W, v); check(j < exp[s].size() && v == exp[s][j], $sformatf("t%0d s%0d address %0d: %0d vs %0d", t, s, j, v, exp[s][j]));
        end
        repeat (3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
