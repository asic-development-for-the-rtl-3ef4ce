// gtrc_control: global control and command handling of the GTRC.
//
// Commands and trigger acknowledges from the tower electronics are passed to
// the front-end chips, each through one flip-flop. Every trigger acknowledge
// also adds one event to the count of events waiting in the front-end
// FIFOs. While one is waiting, an event buffer is free and no tower command
// frame is in progress, the controller reads the event out by itself: it
// sends read-event to all chips (address 1F), starts the hit counter on the
// clock edge that samples the first chip's flag, waits for the hit counter
// to finish, then sends end-read-event and clear-first-event, and commits
// the event buffer with the next time-over-threshold from the TOT FIFO (0
// if there is none). The tower must not send commands while busy is high;
// tower bits arriving during a readout are dropped.
//
// Timing: a front-end chip acts on a command one edge after sampling its
// last bit, and its hit flag is then on the data line one edge later, so the
// first data bit is sampled READ_LAT + 1 edges after the edge that drives
// the last bit of read-event. The autonomous readout sequence and the
// frame-tracking of tower commands are this design's; the document gives
// only the controller's functions.
module gtrc_control
  import glast_pkg::*;
#(
  parameter int unsigned DATA_BITS = CTRL_W,
  parameter int unsigned READ_LAT  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_in,
  input  logic tack_in,
  output logic cmd_out,
  output logic tack_out,
  output logic busy,
  // event buffers
  input  logic buf_free,      // the buffer selected by wr_sel is empty
  output logic wr_sel,
  output logic buf_start,
  output logic commit,
  // hit counter
  output logic hc_start,
  input  logic hc_done,
  // TOT FIFO
  input  logic tot_empty,
  output logic tot_pop
);

  // -------- tower command frame tracking --------
  typedef enum logic [1:0] {F_IDLE, F_HDR, F_DATA} fstate_e;
  fstate_e fstate;
  logic [$clog2(DATA_BITS+1)-1:0] fcnt;
  logic [2:0] fcode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate <= F_IDLE; fcnt <= '0; fcode <= '0;
    end else begin
      unique case (fstate)
        F_IDLE: if (cmd_in) begin fstate <= F_HDR; fcnt <= '0; end
        F_HDR: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt < 3) fcode <= {fcode[1:0], cmd_in};
          if (fcnt == 7) begin
            fcnt   <= '0;
            fstate <= (cmd_e'(fcode) == CMD_LOAD_CTRL) ? F_DATA : F_IDLE;
          end
        end
        F_DATA: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt == $bits(fcnt)'(DATA_BITS - 1)) fstate <= F_IDLE;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // -------- readout sequencer --------
  typedef enum logic [2:0] {S_IDLE, S_READ, S_WAIT, S_COLLECT, S_END, S_CLEAR, S_COMMIT} state_e;
  state_e state;
  logic [3:0] idx;
  logic [1:0] wcnt;
  logic [3:0] pending;

  function automatic logic [8:0] frame(input cmd_e c);
    return {1'b1, c, BCAST};
  endfunction

  logic seq_on, seq_bit;
  always_comb begin
    seq_on  = 1'b1;
    seq_bit = 1'b0;
    unique case (state)
      S_READ:  seq_bit = frame(CMD_READ_EVENT)[idx];
      S_END:   seq_bit = frame(CMD_END_READ)[idx];
      S_CLEAR: seq_bit = frame(CMD_CLEAR_EVENT)[idx];
      S_IDLE:  seq_on  = 1'b0;
      default: seq_bit = 1'b0;
    endcase
  end

  logic go;
  assign go = (state == S_IDLE) && (pending != 0) && buf_free &&
              (fstate == F_IDLE) && !cmd_in;

  assign hc_start  = (state == S_WAIT) && (wcnt == 0);
  assign buf_start = go;
  assign commit    = (state == S_COMMIT);
  assign tot_pop   = commit && !tot_empty;
  assign busy      = (state != S_IDLE) || (pending != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; wcnt <= '0; pending <= '0; wr_sel <= 1'b0;
      cmd_out <= 1'b0; tack_out <= 1'b0;
    end else begin
      cmd_out  <= seq_on ? seq_bit : cmd_in;
      tack_out <= tack_in;
      pending  <= pending + 4'(tack_in) - 4'(commit);
      unique case (state)
        S_IDLE: if (go) begin state <= S_READ; idx <= 4'd8; end
        S_READ: begin
          idx <= idx - 1'b1;
          if (idx == 0) begin state <= S_WAIT; wcnt <= 2'(READ_LAT); end
        end
        S_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt == 0) state <= S_COLLECT;
        end
        S_COLLECT: if (hc_done) begin state <= S_END; idx <= 4'd8; end
        S_END: begin
          idx <= idx - 1'b1;
          if (idx == 0) begin state <= S_CLEAR; idx <= 4'd8; end
        end
        S_CLEAR: begin
          idx <= idx - 1'b1;
          if (idx == 0) state <= S_COMMIT;
        end
        S_COMMIT: begin
          state  <= S_IDLE;
          wr_sel <= !wr_sel;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
