// tb_gtfe_cmd_decoder: self-checking test of the GTFE64 command decoder.
// Sends frames for every command code to matching, broadcast and foreign
// addresses, selected and not, and a control-register load; checks which
// commands come out, their code, that they appear exactly one cycle after
// the last address bit, and that load data is echoed bit for bit.
module tb_gtfe_cmd_decoder;
  import glast_pkg::*;
  localparam int DB = 12;          // short control register for the test

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic cmd_in = 0, selected = 1;
  logic [4:0] chip_addr = 5'd9;
  logic cmd_valid, shift_en, shift_bit;
  cmd_e cmd_code;

  gtfe_cmd_decoder #(.DATA_BITS(DB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int valid_seen; cmd_e code_seen; int valid_cycle, cyc;
  logic [DB-1:0] got; int nshift;
  always @(posedge clk) begin
    cyc++;
    if (cmd_valid) begin valid_seen++; code_seen = cmd_code; valid_cycle = cyc; end
    if (shift_en) begin got = {got[DB-2:0], shift_bit}; nshift++; end
  end

  task automatic frame(cmd_e c, logic [4:0] a, logic [DB-1:0] d, bit with_data, output int last_cyc);
    logic [8:0] h;
    h = {1'b1, c, a};
    for (int i = 8; i >= 0; i--) begin cmd_in = h[i]; @(negedge clk); end
    last_cyc = cyc;             // edge that sampled the last address bit
    if (with_data) for (int i = DB - 1; i >= 0; i--) begin cmd_in = d[i]; @(negedge clk); end
    cmd_in = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int lc;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int c = 2; c < 8; c++) begin
      for (int mode = 0; mode < 4; mode++) begin
        logic [4:0] a;
        bit expect_v;
        a = (mode == 0) ? 5'd9 : (mode == 1) ? BCAST : 5'd10;
        selected = (mode != 3);
        if (mode == 3) a = 5'd9;
        expect_v = (mode != 2) && selected;
        valid_seen = 0;
        frame(cmd_e'(c), a, '0, 0, lc);
        check(valid_seen == (expect_v ? 1 : 0), $sformatf("cmd %0d mode %0d valid count %0d", c, mode, valid_seen));
        if (expect_v) begin
          check(code_seen == cmd_e'(c), "code");
          check(valid_cycle == lc + 1, $sformatf("latency %0d vs %0d", valid_cycle, lc));
        end
      end
    end
    // no-op produces nothing
    valid_seen = 0; selected = 1;
    frame(CMD_NOP, 5'd9, '0, 0, lc);
    check(valid_seen == 0, "nop silent");
    // load accepted even when not selected, ignored for other chips
    selected = 0; nshift = 0; got = '0; valid_seen = 0;
    frame(CMD_LOAD_CTRL, 5'd9, 12'hA5C, 1, lc);
    check(nshift == DB && got == 12'hA5C, $sformatf("load data %h n=%0d", got, nshift));
    check(valid_seen == 0, "load is not a cmd_valid");
    nshift = 0;
    frame(CMD_LOAD_CTRL, 5'd3, 12'hFFF, 1, lc);
    check(nshift == 0, "load for another chip ignored");
    // after a load frame the decoder is back in sync
    selected = 1; valid_seen = 0;
    frame(CMD_READ_EVENT, BCAST, '0, 0, lc);
    check(valid_seen == 1 && code_seen == CMD_READ_EVENT, "resync after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
