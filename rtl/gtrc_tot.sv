// gtrc_tot: trigger gate and time-over-threshold (TOT) counter of the GTRC
// readout controller.
//
// The layer's Fast-OR from the front-end chips passes the gate (enabled by
// trig_en) and leaves the chip at once as the layer's prompt trigger output.
// The counter measures how long that gated trigger stays high, in clock
// cycles (50 ns at 20 MHz), saturating at 2**TOT_W-1. On the cycle after
// the trigger falls it presents the length on tot with tot_valid high for
// one cycle. The gate as an enable and the cycle-count units are this
// design's choices; the document gives the function only.
module gtrc_tot
  import glast_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig_in,
  input  logic             trig_en,
  output logic             trig_out,
  output logic             tot_valid,
  output logic [TOT_W-1:0] tot
);

  logic [TOT_W-1:0] cnt;
  logic             prev;

  assign trig_out = trig_in && trig_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; prev <= 1'b0; tot_valid <= 1'b0; tot <= '0;
    end else begin
      prev      <= trig_out;
      tot_valid <= 1'b0;
      if (trig_out) begin
        if (!prev)          cnt <= TOT_W'(1);
        else if (~&cnt)     cnt <= cnt + 1'b1;
      end else if (prev) begin
        tot_valid <= 1'b1;
        tot       <= cnt;
      end
    end
  end

endmodule
