// gtrc_hit_counter: sparse-readout front end of the GTRC (the "hit counter").
//
// Watches the serial data arriving from the chain of front-end chips during
// a read-event and turns it into a list of hit-strip addresses. The stream
// is, for each chip from the nearest one out: a flag bit, then, if the flag
// is 1, that chip's 64 channel bits, channel 0 first. After nchips flags the
// event is complete and done pulses. Each 1 channel bit produces hit_valid
// with hit_addr = chip * 64 + channel, where chip is the chip's position
// counted from the left end of the layer (side = 1: the controller sits at
// the right end, so the k-th chip it reads is NUM_FE-1-k). hit_count counts
// the hits of the event.
//
// Timing: start is high in the cycle whose clock edge samples the first
// flag; bits are then sampled at every edge. The stream format is this
// design's, matching gtfe_out_shift.
module gtrc_hit_counter
  import glast_pkg::*;
#(
  parameter int unsigned NUM_FE = 25,
  parameter int unsigned NCH    = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               side,
  input  logic [4:0]         nchips,
  input  logic               start,
  input  logic               din,
  output logic               busy,
  output logic               done,
  output logic               hit_valid,
  output logic [STRIP_W-1:0] hit_addr,
  output logic [CNT_W+3:0]   hit_count
);

  typedef enum logic [1:0] {S_IDLE, S_FLAG, S_DATA} state_e;
  state_e state;
  logic [4:0]  chip;
  logic [$clog2(NCH)-1:0] ch;

  logic [4:0] chip_pos;
  assign chip_pos = side ? 5'(NUM_FE - 1) - chip : chip;
  assign busy = (state != S_IDLE) || start;

  // A sample is taken at this edge when start is high or a read is running.
  logic  in_flag;
  assign in_flag = (state == S_FLAG) || (state == S_IDLE && start);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; chip <= '0; ch <= '0; done <= 1'b0;
      hit_valid <= 1'b0; hit_addr <= '0; hit_count <= '0;
    end else begin
      done      <= 1'b0;
      hit_valid <= 1'b0;
      if (state == S_IDLE && start) begin
        chip      <= '0;
        hit_count <= '0;
      end
      if (in_flag) begin
        if (state == S_IDLE && nchips == 0) begin
          done <= 1'b1;
        end else if (din) begin
          state <= S_DATA;
          ch    <= '0;
        end else if ((state == S_IDLE ? 5'd0 : chip) + 1'b1 == nchips) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end else begin
          state <= S_FLAG;
          chip  <= (state == S_IDLE ? 5'd0 : chip) + 1'b1;
        end
      end else if (state == S_DATA) begin
        if (din) begin
          hit_valid <= 1'b1;
          hit_addr  <= STRIP_W'(chip_pos) * STRIP_W'(NCH) + STRIP_W'(ch);
          hit_count <= hit_count + 1'b1;
        end
        ch <= ch + 1'b1;
        if (ch == $clog2(NCH)'(NCH - 1)) begin
          if (chip + 1'b1 == nchips) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_FLAG;
            chip  <= chip + 1'b1;
          end
        end
      end
    end
  end

endmodule
