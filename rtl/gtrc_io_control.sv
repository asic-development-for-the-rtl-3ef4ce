// gtrc_io_control: token-controlled event output of the GTRC.
//
// The controllers of one side of a tower form a chain: each sends its data
// toward the tower electronics (data_out, to the previous layer) and
// forwards, through one flip-flop, whatever the layer above sends it
// (data_in, from the next layer). A one-cycle token_in pulse from the
// previous layer lets this controller send its oldest complete event; it
// waits for one if none is ready yet, sends it, frees the buffer and passes
// the token on with a one-cycle token_out pulse. So each token passed up the
// tower collects one event from every layer, nearest layer first, and the
// line never carries two senders at once.
//
// Record, MSB first, one bit per clock: a 1 start bit, layer id (4 bits),
// hit count (7), overflow (1), TOT (8), then each hit-strip address (11
// bits). The line idles at 0. The two event buffers are read alternately,
// starting with buffer 0. The record format is this design's own.
module gtrc_io_control
  import glast_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [LAYER_W-1:0]       layer_id,
  input  logic                     token_in,
  output logic                     token_out,
  input  logic                     data_in,
  output logic                     data_out,
  // event buffer read side
  output logic                     rd_sel,
  output logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic                     release_buf,
  input  logic [1:0]               buf_full,
  input  logic [CNT_W-1:0]         buf_count,
  input  logic                     buf_overflow,
  input  logic [TOT_W-1:0]         buf_tot,
  input  logic [STRIP_W-1:0]       buf_data
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_HDR, S_HITS} state_e;
  state_e state;

  logic [REC_HDR_BITS-1:0] hdr;
  logic [4:0]              bitn;
  logic                    tx, fwd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; rd_sel <= 1'b0; rd_idx <= '0; release_buf <= 1'b0;
      token_out <= 1'b0; hdr <= '0; bitn <= '0; tx <= 1'b0; fwd <= 1'b0;
    end else begin
      fwd         <= data_in;
      tx          <= 1'b0;
      token_out   <= 1'b0;
      release_buf <= 1'b0;
      if (release_buf) rd_sel <= !rd_sel;
      unique case (state)
        S_IDLE: if (token_in) state <= S_WAIT;
        S_WAIT: if (buf_full[rd_sel] && !release_buf) begin
          hdr    <= {1'b1, layer_id, buf_count, buf_overflow, buf_tot};
          bitn   <= 5'(REC_HDR_BITS - 1);
          rd_idx <= '0;
          state  <= S_HDR;
        end
        S_HDR: begin
          tx   <= hdr[bitn];
          bitn <= bitn - 1'b1;
          if (bitn == 0) begin
            if (buf_count == 0) begin
              state <= S_IDLE; release_buf <= 1'b1; token_out <= 1'b1;
            end else begin
              state <= S_HITS;
              bitn  <= 5'(STRIP_W - 1);
            end
          end
        end
        S_HITS: begin
          tx   <= buf_data[bitn[3:0]];
          bitn <= bitn - 1'b1;
          if (bitn == 0) begin
            if (CNT_W'(rd_idx) + 1'b1 == buf_count) begin
              state <= S_IDLE; release_buf <= 1'b1; token_out <= 1'b1;
            end else begin
              rd_idx <= rd_idx + 1'b1;
              bitn   <= 5'(STRIP_W - 1);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign data_out = tx || fwd;

endmodule
