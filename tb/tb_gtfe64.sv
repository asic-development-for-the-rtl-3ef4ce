// tb_gtfe64: self-checking test of one GTFE64 chip.
// Loads the control register through decoder A, stores several triggered
// events in the FIFO, reads them out of the left shift register one by one
// (checking flag, channel bits, the data mask and the one-cycle command
// latency), pops them, and checks reset-FIFO, empty-event bypass, decoder
// select (commands on the deselected line are ignored), right-hand readout,
// the Fast-OR chain with its trigger mask, the calibration strobe's pulse
// length and mask, the control-register read-back and reset-chip.
module tb_gtfe64;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;

  logic [4:0] chip_addr = 5'd4;
  logic cmd_a = 0, cmd_b = 0, tack_a = 0, tack_b = 0;
  logic [63:0][11:0] charge;
  logic data_l_in = 0, data_l_out, data_r_in = 0, data_r_out;
  logic trig_from_right = 0, trig_to_left, trig_from_left = 0, trig_to_right, ctrl_reg_out;

  gtfe64 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic send(bit b_side, logic [255:0] v, int n);
    for (int i = n - 1; i >= 0; i--) begin
      if (b_side) cmd_b = v[i]; else cmd_a = v[i];
      @(negedge clk);
    end
    cmd_a = 0; cmd_b = 0;
  endtask

  task automatic cmd(bit b_side, cmd_e c, logic [4:0] a = 5'd4);
    send(b_side, 256'({1'b1, c, a}), 9);
  endtask

  logic [CTRL_W-1:0] readback;
  task automatic load(ctrl_reg_t v, logic [4:0] a = 5'd4);
    send(0, 256'({1'b1, CMD_LOAD_CTRL, a}), 9);
    for (int i = CTRL_W - 1; i >= 0; i--) begin
      cmd_a = v[i];
      @(negedge clk);
      readback[i] = ctrl_reg_out;
    end
    cmd_a = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic tack(bit b_side);
    if (b_side) tack_b = 1; else tack_a = 1;
    @(negedge clk);
    tack_a = 0; tack_b = 0;
  endtask

  // read an event from one side; returns flag and 64 bits
  task automatic read_event(bit b_side, bit right, output bit flag, output logic [63:0] bits);
    cmd(b_side, CMD_READ_EVENT);
    // the last bit was sampled at the edge just passed; the flag is out one
    // edge later
    @(negedge clk);
    flag = right ? data_r_out : data_l_out;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      bits[c] = right ? data_r_out : data_l_out;
    end
    cmd(b_side, CMD_END_READ);
  endtask

  ctrl_reg_t c;
  logic [63:0] pat [3];

  initial begin
    bit f;
    logic [63:0] b;
    charge = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    c = '0;
    c.thr_dac = 7'd15;                       // 90 mV
    c.data_mask = ~64'h0000_0000_0000_0100;  // channel 8 masked out
    c.trig_mask = ~64'h8000_0000_0000_0000;  // channel 63 not in the trigger
    c.trig_left_en = 1;
    c.cal_mask = 64'h0000_0000_00FF_0000;
    c.cal_dac = 7'h40 | 7'd5;                // 120 mV -> ~5 fC
    load(c);
    // three events, channel charges 1 fC (fires) or 0.5 fC (does not)
    for (int e = 0; e < 3; e++) begin
      pat[e] = {$urandom, $urandom} & {$urandom, $urandom};
      if (e == 1) pat[e] = '0;
      for (int i = 0; i < 64; i++) charge[i] = pat[e][i] ? 12'd100 : 12'd50;
      @(negedge clk);
      check(trig_to_left == |(pat[e] & c.trig_mask), "fast-or left");
      check(trig_to_right == 1'b0, "right fast-or disabled");
      tack(0);
      charge = '0;
      @(negedge clk);
    end
    check(dut.fifo_count == 3, "three events stored");
    for (int e = 0; e < 3; e++) begin
      read_event(0, 0, f, b);
      check(f == |(pat[e] & c.data_mask), $sformatf("flag event %0d", e));
      if (f) check(b == (pat[e] & c.data_mask), $sformatf("data event %0d", e));
      else   check(b == '0, "bypassed chip passes its input");
      cmd(0, CMD_CLEAR_EVENT);
    end
    @(negedge clk);
    check(dut.fifo_count == 0, "fifo emptied by clear-first-event");
    // reset FIFO
    tack(0); tack(0);
    check(dut.fifo_count == 2, "two more");
    cmd(0, CMD_RESET_FIFO);
    @(negedge clk);
    check(dut.fifo_count == 0, "reset fifo");
    // trigger chain through the chip
    trig_from_right = 1; @(negedge clk);
    check(trig_to_left == 1, "fast-or passes neighbour");
    trig_from_right = 0;
    // calibration strobe: channels 16..23 pulsed for 20 cycles
    begin
      int n;
      n = 0;
      cmd(0, CMD_CAL_STROBE);
      for (int k = 0; k < 30; k++) begin
        if (trig_to_left) n++;
        if (k == 5) tack(0); else @(negedge clk);
      end
      check(n == 20, $sformatf("calibration pulse %0d cycles", n));
      read_event(0, 0, f, b);
      check(f && b == 64'h0000_0000_00FF_0000, "calibration hits");
      cmd(0, CMD_CLEAR_EVENT);
    end
    // select decoder B, shift right; commands on A now ignored
    begin
      ctrl_reg_t c2;
      c2 = c; c2.dec_sel = 1; c2.read_right = 1; c2.trig_left_en = 0; c2.trig_right_en = 1;
      load(c2);
      check(readback == c, "control register read-back");
      for (int i = 0; i < 64; i++) charge[i] = (i == 40) ? 12'd300 : 12'd0;
      @(negedge clk);
      check(trig_to_right == 1 && trig_to_left == 0, "fast-or right");
      tack(0);                               // ignored: A deselected
      check(dut.fifo_count == 0, "tack from deselected side ignored");
      tack(1);
      charge = '0;
      check(dut.fifo_count == 1, "tack from B");
      cmd(0, CMD_RESET_FIFO);                // ignored
      check(dut.fifo_count == 1, "command on deselected decoder ignored");
      read_event(1, 1, f, b);
      check(f && b == (64'h1 << 40), "right readout");
      cmd(1, CMD_RESET_CHIP, BCAST);
      @(negedge clk);
      check(dut.ctrl == '0 && dut.fifo_count == 0, "reset chip");
    end
    // commands for another chip are ignored
    load(c, 5'd7);
    check(dut.ctrl == '0, "load for another address ignored");
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
