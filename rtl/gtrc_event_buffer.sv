// gtrc_event_buffer: one of the GTRC's two event buffers.
//
// Collects the hit-strip addresses of one event in a small RAM, with the
// event's time-over-threshold. start empties it for a new event; each
// wr_en appends one address, up to DEPTH, after which further hits are
// dropped and overflow is set. commit marks the event complete (full) and
// records tot; the I/O controller then reads the entries by index (rd_idx
// to rd_data, combinational) and frees the buffer with release. The
// controller uses two of these alternately so that one event can be sent
// down the tower while the next is read from the front-end chips. The depth
// of 64 addresses is this design's choice.
module gtrc_event_buffer
  import glast_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     wr_en,
  input  logic [STRIP_W-1:0]       wr_data,
  input  logic                     commit,
  input  logic [TOT_W-1:0]         commit_tot,
  input  logic                     release_buf,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic [STRIP_W-1:0]       rd_data,
  output logic [CNT_W-1:0]         count,
  output logic                     overflow,
  output logic [TOT_W-1:0]         tot,
  output logic                     full
);

  logic [STRIP_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && count < CNT_W'(DEPTH)) mem[count[$clog2(DEPTH)-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; overflow <= 1'b0; tot <= '0; full <= 1'b0;
    end else begin
      if (start) begin
        count    <= '0;
        overflow <= 1'b0;
      end else if (wr_en) begin
        if (count < CNT_W'(DEPTH)) count <= count + 1'b1;
        else                       overflow <= 1'b1;
      end
      if (commit) begin
        full <= 1'b1;
        tot  <= commit_tot;
      end else if (release_buf) begin
        full <= 1'b0;
      end
    end
  end

  assign rd_data = mem[rd_idx];

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    full |-> !(wr_en || start));

endmodule
