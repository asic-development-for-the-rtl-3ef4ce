// gtrc: GTRC readout controller chip, one at each end of a tracker layer.
//
// It controls the front-end chips of its end of the layer and reads them
// out (gtrc_control), builds the list of hit-strip addresses from the
// serial front-end data (gtrc_hit_counter) into two alternating event
// buffers (gtrc_event_buffer), gates the layer's Fast-OR into a prompt
// trigger output and measures its time over threshold (gtrc_tot) into a
// TOT FIFO, and sends finished events down the tower under token control
// (gtrc_io_control).
//
// Configuration that the document does not say how to load is taken from
// input pins: side (0 = left end of the layer, 1 = right end), nchips (how
// many chips shift their data toward this controller), layer_id (sent in
// every record) and trig_en (the trigger gate). All timing is in cycles of
// the one 20 MHz clock shared with the front-end chips.
module gtrc
  import glast_pkg::*;
#(
  parameter int unsigned NUM_FE    = 25,
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned TOT_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               side,
  input  logic [4:0]         nchips,
  input  logic [LAYER_W-1:0] layer_id,
  input  logic               trig_en,
  // from / to the tower electronics
  input  logic               cmd_in,
  input  logic               tack_in,
  output logic               trig_out,
  output logic               busy,
  // token chain: previous layer is toward the tower electronics
  input  logic               token_in,
  output logic               data_out,
  input  logic               data_in,
  output logic               token_out,
  // to / from the front-end chips
  output logic               fe_cmd,
  output logic               fe_tack,
  input  logic               fe_data,
  input  logic               fe_trig
);

  localparam int unsigned IW = $clog2(BUF_DEPTH);

  // trigger gate, TOT counter and TOT FIFO
  logic tot_valid, tot_empty, tot_pop, tot_full;
  logic [TOT_W-1:0] tot, tot_head;
  logic [$clog2(TOT_DEPTH+1)-1:0] tot_count;

  gtrc_tot u_tot (.clk, .rst_n, .trig_in(fe_trig), .trig_en, .trig_out,
                  .tot_valid, .tot);

  sync_fifo #(.WIDTH(TOT_W), .DEPTH(TOT_DEPTH)) u_tot_fifo (
    .clk, .rst_n, .clear(1'b0), .push(tot_valid), .din(tot), .pop(tot_pop),
    .dout(tot_head), .empty(tot_empty), .full(tot_full), .count(tot_count));

  // control
  logic wr_sel, buf_start, commit, hc_start, hc_done;
  logic [1:0] buf_full;

  gtrc_control u_ctrl (
    .clk, .rst_n, .cmd_in, .tack_in, .cmd_out(fe_cmd), .tack_out(fe_tack), .busy,
    .buf_free(!buf_full[wr_sel]), .wr_sel, .buf_start, .commit,
    .hc_start, .hc_done, .tot_empty, .tot_pop);

  // hit counter
  logic hit_valid, hc_busy;
  logic [STRIP_W-1:0] hit_addr;
  logic [CNT_W+3:0]   hit_count;

  gtrc_hit_counter #(.NUM_FE(NUM_FE), .NCH(NUM_CH)) u_hits (
    .clk, .rst_n, .side, .nchips, .start(hc_start), .din(fe_data),
    .busy(hc_busy), .done(hc_done), .hit_valid, .hit_addr, .hit_count);

  // event buffers
  logic rd_sel, release_buf;
  logic [IW-1:0] rd_idx;
  logic [STRIP_W-1:0] rd_data [2];
  logic [CNT_W-1:0]   count [2];
  logic [1:0]         overflow;
  logic [TOT_W-1:0]   buf_tot [2];

  for (genvar b = 0; b < 2; b++) begin : g_buf
    gtrc_event_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .start(buf_start && wr_sel == b),
      .wr_en(hit_valid && wr_sel == b),
      .wr_data(hit_addr),
      .commit(commit && wr_sel == b),
      .commit_tot(tot_empty ? '0 : tot_head),
      .release_buf(release_buf && rd_sel == b),
      .rd_idx, .rd_data(rd_data[b]), .count(count[b]), .overflow(overflow[b]),
      .tot(buf_tot[b]), .full(buf_full[b]));
  end

  gtrc_io_control #(.DEPTH(BUF_DEPTH)) u_io (
    .clk, .rst_n, .layer_id, .token_in, .token_out, .data_in, .data_out,
    .rd_sel, .rd_idx, .release_buf, .buf_full,
    .buf_count(count[rd_sel]), .buf_overflow(overflow[rd_sel]),
    .buf_tot(buf_tot[rd_sel]), .buf_data(rd_data[rd_sel]));

endmodule
