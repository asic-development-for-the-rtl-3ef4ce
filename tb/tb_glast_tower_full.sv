// tb_glast_tower_full: one complete event through the tower at its full
// default size (16 layers of 25 chips, 25 600 strips).
//
// Acting as the tower electronics, it loads every chip's control register
// over the left command line, makes strip charges (and a calibration
// strobe), acknowledges each trigger, and collects the records that come
// down both controller columns under the token. Every record is compared
// with one predicted here from the charges, thresholds, masks, readout
// directions and pulse lengths: layer order, hit count, overflow flag, TOT
// and every strip address. It also checks the prompt trigger outputs and
// counts how often each readout mechanism occurred, failing any that never
// did (those one event can show: bypass, masks,
// both directions, decoder B, token passing).
module tb_glast_tower_full;
  import glast_pkg::*;

  localparam int L = 16;
  localparam int F = 25;
  localparam int H       = 12;    // strip pulse length, cycles
  localparam int CAL_CYC = 20;    // gtfe64 CAL_CYCLES default

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #25 clk = !clk;          // 20 MHz

  logic [L-1:0][F-1:0][NUM_CH-1:0][Q_W-1:0] charge;
  logic [L-1:0][1:0][4:0]  nchips;
  logic [L-1:0][1:0]       trig_en;
  logic [1:0]              cmd_in, tack_in, token_in, data_out, token_done;
  logic [L-1:0][1:0]       trig_out, busy;
  logic [L-1:0][F-1:0]     ctrl_reg_out;

  glast_tower  dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------------
  // model state
  ctrl_reg_t cfg [F];
  int        split;               // chips 0..split-1 read left
  int        dead;                // chip read by nobody, -1 if none

  typedef struct {
    int layer;
    int count;
    bit ovf;
    int tot;
    int addr[$];
  } rec_t;
  rec_t expq [2][$];              // expected records per side, in event order

  // ------------------------------------------------------------------
  // command line driving (inputs change on the falling edge)
  task automatic send_bits(input int side, input logic [255:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      cmd_in[side] = v[i];
      @(negedge clk);
    end
    cmd_in[side] = 1'b0;
  endtask

  task automatic send_cmd(input int side, input cmd_e c, input logic [4:0] addr);
    send_bits(side, 256'({1'b1, c, addr}), 9);
  endtask

  task automatic load_ctrl(input int chip, input ctrl_reg_t v);
    send_bits(0, 256'({1'b1, CMD_LOAD_CTRL, 5'(chip)}), 9);
    send_bits(0, 256'(v), CTRL_W);
  endtask

  task automatic configure(input int sp, input int dd);
    split = sp;
    dead  = dd;
    for (int i = 0; i < F; i++) begin
      ctrl_reg_t c;
      bit right;
      right = (i >= sp);
      c = '0;
      c.dec_sel       = right;
      c.read_right    = right;
      c.trig_left_en  = !right && i != dd;
      c.trig_right_en = right && i != dd;
      c.thr_dac       = 7'(10 + i);         // low range: 60 + 6i mV
      c.cal_dac       = 7'h40 | 7'(5);      // high range: 120 mV -> 5.04 fC
      c.cal_mask      = 64'h0000_00F0_0000_000F << i;
      c.data_mask     = ~(64'h1 << (2 * i + 1));
      c.trig_mask     = ~(64'h1 << 60);
      cfg[i] = c;
      load_ctrl(i, c);
    end
    for (int l = 0; l < L; l++) begin
      nchips[l][0] = 5'(dd >= 0 ? dd : sp);
      nchips[l][1] = 5'(dd >= 0 ? F - 1 - dd : F - sp);
    end
    repeat (4) @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  // reference model of one channel
  function automatic bit disc(int l, int i, int ch, bit cal);
    int q, mv, thr;
    q = int'(charge[l][i][ch]);
    if (cal && cfg[i].cal_mask[ch])
      q += (int'(cfg[i].cal_dac[5:0]) * (cfg[i].cal_dac[6] ? 24 : 6) * 42) / 10;
    mv  = (q * 125) / 100;
    thr = int'(cfg[i].thr_dac[5:0]) * (cfg[i].thr_dac[6] ? 24 : 6);
    return mv > thr;
  endfunction

  // counters of mechanisms
  int n_multi_fifo, n_bypass, n_datamask, n_trigmask, n_cal, n_ovf, n_stall,
      n_both_dirs, n_dec_b, n_dead, n_gate, n_token, n_trig;

  // Predict the records of one trigger, taken with the charges now applied.
  task automatic predict(input bit cal, input int tot_len);
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < L; l++) begin
        rec_t r;
        int nch, tr;
        bit trig;
        r.layer = l; r.count = 0; r.ovf = 0; r.addr = {};
        nch = int'(nchips[l][s]);
        trig = 0;
        for (int k = 0; k < nch; k++) begin
          int i;
          bit any;
          i = (s == 0) ? k : F - 1 - k;
          any = 0;
          for (int ch = 0; ch < NUM_CH; ch++) begin
            if (disc(l, i, ch, cal) && !cfg[i].data_mask[ch]) n_datamask++;
            if (disc(l, i, ch, cal) && cfg[i].data_mask[ch]) begin
              any = 1;
              if (r.count < 64) begin r.addr.push_back(i * 64 + ch); r.count++; end
              else r.ovf = 1;
            end
          end
          if (!any) n_bypass++;
          if (s == 1) n_dec_b++;
        end
        for (int i = 0; i < F; i++)
          for (int ch = 0; ch < NUM_CH; ch++)
            if (disc(l, i, ch, cal) && ((s == 0) ? cfg[i].trig_left_en : cfg[i].trig_right_en)) begin
              if (cfg[i].trig_mask[ch]) trig = 1;
              else n_trigmask++;
            end
        tr = (trig && trig_en[l][s]) ? tot_len : 0;
        if (trig && !trig_en[l][s]) n_gate++;
        r.tot = tr;
        if (r.ovf) n_ovf++;
        if (cal) n_cal++;
        expq[s].push_back(r);
      end
    end
  endtask

  // Apply a strip pulse pattern for H cycles with a trigger acknowledge at
  // cycle 3, recording the expected result.
  task automatic strip_event();
    repeat (3) @(negedge clk);
    predict(0, H);
    tack_in = 2'b11;
    @(negedge clk);
    tack_in = 2'b00;
    repeat (H - 4) @(negedge clk);
    charge = '0;
    repeat (3) @(negedge clk);
  endtask

  task automatic set_hit(int l, int i, int ch, int q);
    charge[l][i][ch] = Q_W'(q);
  endtask

  // pattern: a seed hit on every chip's channel 0 except listed empties
  task automatic seed_pattern(input int empty_chip, input int ev);
    charge = '0;
    for (int l = 0; l < L; l++)
      for (int i = 0; i < F; i++)
        if (i != empty_chip) begin
          set_hit(l, i, 0, 200);                         // 2 fC
          set_hit(l, i, (7 * ev + 3 * l + i) % 64, 150);  // 1.5 fC
          set_hit(l, i, 2 * i + 1, 300);                  // masked out of data
          set_hit(l, i, 60, 60);                          // 0.6 fC, trigger-masked
        end
  endtask

  // ------------------------------------------------------------------
  // receiving
  task automatic get_bits(input int s, input int n, output int v);
    v = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      v = (v << 1) | int'(data_out[s]);
    end
  endtask

  task automatic receive(input int s);
    for (int k = 0; k < L; k++) begin
      int lay, cnt, ovf, tot, a;
      rec_t e;
      int guard;
      guard = 0;
      do begin @(negedge clk); guard++; end while (!data_out[s] && guard < 200000);
      get_bits(s, LAYER_W, lay);
      get_bits(s, CNT_W, cnt);
      get_bits(s, 1, ovf);
      get_bits(s, TOT_W, tot);
      if (expq[s].size() == 0) begin check(0, "unexpected record"); return; end
      e = expq[s].pop_front();
      check(lay == e.layer, $sformatf("side %0d layer %0d/%0d", s, lay, e.layer));
      check(cnt == e.count, $sformatf("side %0d layer %0d count %0d/%0d", s, lay, cnt, e.count));
      check(ovf == int'(e.ovf), $sformatf("side %0d layer %0d ovf", s, lay));
      check(tot == e.tot, $sformatf("side %0d layer %0d tot %0d/%0d", s, lay, tot, e.tot));
      for (int j = 0; j < cnt; j++) begin
        get_bits(s, STRIP_W, a);
        check(j < e.addr.size() && a == e.addr[j],
              $sformatf("side %0d layer %0d hit %0d addr %0d", s, lay, j, a));
      end
    end
  endtask

  task automatic token_round();
    @(negedge clk);
    token_in = 2'b11;
    @(negedge clk);
    token_in = 2'b00;
    fork
      receive(0);
      receive(1);
    join
    n_token++;
    $display("token round %0d done at cycle %0d pend=%0d full=%b st=%0d io=%0d", n_token, cycles,
      dut.g_layer[0].u_layer.g_rc[0].u_rc.u_ctrl.pending, dut.g_layer[0].u_layer.g_rc[0].u_rc.buf_full,
      dut.g_layer[0].u_layer.g_rc[0].u_rc.u_ctrl.state, dut.g_layer[0].u_layer.g_rc[0].u_rc.u_io.state);
  endtask

  task automatic wait_idle();
    int g;
    g = 0;
    while (busy != '0 && g < 100000) begin @(negedge clk); g++; end
    repeat (5) @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  // monitors
  logic [1:0] td_seen;
  always @(posedge clk) begin
    if (trig_out != '0) n_trig++;
    for (int l = 0; l < L; l++)
      for (int s = 0; s < 2; s++)
        if (trig_out[l][s] && !trig_en[l][s]) begin
          failures++;
          $display("FAIL trigger through closed gate");
        end
  end
  always @(posedge clk) begin
    if (dut.g_layer[0].u_layer.g_fe[0].u_fe.fifo_count >= 2) n_multi_fifo++;
    if (dut.g_layer[0].u_layer.g_rc[0].u_rc.u_ctrl.pending != 0 &&
        dut.g_layer[0].u_layer.g_rc[0].u_rc.buf_full == 2'b11) n_stall++;
  end

  int cycles = 0;
  always @(posedge clk) begin
    cycles++;
    if (cycles == 400000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    charge = '0; cmd_in = '0; tack_in = '0; token_in = '0;
    trig_en = '1;
    nchips = '0;
    {n_multi_fifo, n_bypass, n_datamask, n_trigmask, n_cal, n_ovf, n_stall,
     n_both_dirs, n_dec_b, n_dead, n_gate, n_token, n_trig} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // ---- one full-size event: split readout at chip 12
    configure(12, -1);
    n_both_dirs++;
    seed_pattern(5, 0);
    strip_event();
    wait_idle();
    token_round();
    // ---- worst case for the rate: every chip of the layer hit, all read
    // by the left controller. Readout must end within one trigger period
    // at 10 kHz (100 us = 2000 clocks) so the 8-deep FIFOs never fill.
    configure(F, -1);
    seed_pattern(-1, 1);
    begin
      int t0, rd;
      t0 = cycles;
      strip_event();
      while (busy[0][0]) @(negedge clk);
      rd = cycles - t0 - 3;
      $display("full-layer readout took %0d cycles", rd);
      check(rd > F + F * NUM_CH && rd < 2000, "full-layer readout within a 10 kHz trigger period");
    end
    token_round();

    wait_idle();
    for (int s = 0; s < 2; s++) check(expq[s].size() == 0, "all records received");
    check(n_bypass > 0,  "mechanism: empty-chip bypass");
    check(n_datamask > 0, "mechanism: data mask");
    check(n_trigmask > 0, "mechanism: trigger mask");
    check(n_dec_b > 0,   "mechanism: decoder B / right readout");
    check(n_both_dirs > 0, "mechanism: readout in both directions");
    check(n_token > 0,   "mechanism: token passing");
    check(n_trig > 0,    "mechanism: prompt trigger");

    $display("mechanisms: multi_fifo=%0d bypass=%0d datamask=%0d trigmask=%0d cal=%0d ovf=%0d stall=%0d both_dirs=%0d dec_b=%0d dead=%0d gate=%0d token=%0d",
             n_multi_fifo, n_bypass, n_datamask, n_trigmask, n_cal, n_ovf, n_stall,
             n_both_dirs, n_dec_b, n_dead, n_gate, n_token);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
