// tb_gtrc_control: checks the GTRC's command forwarding and readout
// sequencer. Tower commands and trigger acknowledges must reach the chips
// one cycle later and unchanged. Each acknowledge must lead to exactly a
// read-event frame, a hit-counter start two cycles after that frame's last
// bit (when the first chip's flag is on the line), then, after the hit
// counter finishes, end-read-event and clear-first-event frames and a
// commit that alternates the event buffers and pops the TOT FIFO when it
// holds a value. A readout must not start while a tower frame is on the
// line or while the next buffer is full.
module tb_gtrc_control;
  import glast_pkg::*;
  localparam int DB = 16;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic cmd_in = 0, tack_in = 0, cmd_out, tack_out, busy;
  logic buf_free = 1, wr_sel, buf_start, commit, hc_start, hc_done = 0, tot_empty = 1, tot_pop;

  gtrc_control #(.DATA_BITS(DB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // decode frames on cmd_out, sampled at falling edges
  int cyc;                     // falling-edge count
  int fstate, fcnt; logic [7:0] hdr; int frames[$]; int last_read_end;
  int n_start, start_cyc, n_commit, n_pop;
  always @(negedge clk) begin
    cyc++;
    if (hc_start) begin n_start++; start_cyc = cyc; end
    if (commit) n_commit++;
    if (tot_pop) n_pop++;
    case (fstate)
      0: if (cmd_out) begin fstate = 1; fcnt = 0; end
      1: begin
        hdr = {hdr[6:0], cmd_out}; fcnt++;
        if (fcnt == 8) begin
          frames.push_back(int'(hdr));
          if (hdr == {CMD_READ_EVENT, BCAST}) last_read_end = cyc;
          fstate = (hdr[7:5] == CMD_LOAD_CTRL) ? 2 : 0; fcnt = 0;
        end
      end
      default: begin fcnt++; if (fcnt == DB) fstate = 0; end
    endcase
  end

  // hit counter model: done a few cycles after start
  always @(posedge clk) begin
    hc_done <= 1'b0;
    if (hc_start) fork begin repeat (37) @(posedge clk); hc_done <= 1'b1; end join_none
  end

  task automatic tower_frame(cmd_e c, logic [4:0] a);
    logic [8:0] h;
    h = {1'b1, c, a};
    for (int i = 8; i >= 0; i--) begin
      cmd_in = h[i];
      @(negedge clk);
      #1 check(cmd_out == h[i], "forwarded bit");
    end
    if (c == CMD_LOAD_CTRL) for (int i = 0; i < DB; i++) begin
      cmd_in = 1'($urandom); @(negedge clk); #1 check(cmd_out == cmd_in, "forwarded data");
    end
    cmd_in = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    tower_frame(CMD_CAL_STROBE, 5'd3);
    tower_frame(CMD_LOAD_CTRL, BCAST);
    repeat (3) @(negedge clk);
    frames = {};
    // one event
    tack_in = 1; @(negedge clk); tack_in = 0;
    #1 check(tack_out == 1'b1, "tack forwarded");
    repeat (120) @(negedge clk);
    check(frames.size() == 3, $sformatf("three frames, got %0d", frames.size()));
    if (frames.size() == 3) begin
      check(frames[0] == {CMD_READ_EVENT, BCAST}, "read-event");
      check(frames[1] == {CMD_END_READ, BCAST}, "end-read-event");
      check(frames[2] == {CMD_CLEAR_EVENT, BCAST}, "clear-first-event");
    end
    check(n_start == 1 && start_cyc == last_read_end + 2, $sformatf("hc_start timing %0d vs %0d", start_cyc, last_read_end));
    check(n_commit == 1 && wr_sel == 1'b1, "commit and buffer swap");
    check(n_pop == 0, "no pop from an empty TOT FIFO");
    check(!busy, "idle");
    // acknowledge during a tower frame: readout waits for the frame's end
    frames = {};
    tot_empty = 0;
    fork
      tower_frame(CMD_LOAD_CTRL, 5'd2);
      begin repeat (3) @(negedge clk); tack_in = 1; @(negedge clk); tack_in = 0; end
    join
    repeat (120) @(negedge clk);
    check(frames.size() == 4 && frames[1] == {CMD_READ_EVENT, BCAST}, "readout after tower frame");
    check(n_commit == 2 && n_pop == 1, "TOT popped at commit");
    // next buffer full: stall until it is freed
    buf_free = 0;
    frames = {};
    tack_in = 1; @(negedge clk); tack_in = 0;
    repeat (100) @(negedge clk);
    check(frames.size() == 0 && busy, "stalled while no buffer is free");
    buf_free = 1;
    repeat (120) @(negedge clk);
    check(frames.size() == 3 && n_commit == 3 && !busy, "resumed");
    // two acknowledges back to back: two readouts
    tack_in = 1; @(negedge clk); @(negedge clk); tack_in = 0;
    repeat (300) @(negedge clk);
    check(n_commit == 5 && !busy, "two events read");
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
