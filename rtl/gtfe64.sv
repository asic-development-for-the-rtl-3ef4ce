// gtfe64: the GTFE64 64-channel silicon-strip front-end readout chip.
//
// Strip charges go through the analog channels (behavioural model) to
// discriminators whose threshold comes from the threshold DAC. The
// discriminator outputs feed the trigger path (trigger mask, 64-input OR,
// left/right Fast-OR chain) and, on a trigger acknowledge, are written
// through the data mask into an 8-deep event FIFO. A read-event command
// copies the oldest event into the output shift register of the selected
// direction, which then shifts one place per clock (with the empty-chip
// bypass) until an end-read-event command. Clear-first-event pops the FIFO.
// A calibration strobe injects the calibration DAC's charge into the
// channels in the calibration mask for CAL_CYCLES clocks.
//
// Two redundant command decoders (A from the left controller, B from the
// right) share the control register. Either may load it; only the decoder
// the control register selects can issue other commands, and only that
// side's trigger acknowledge is used. The reset pin and the reset-chip
// command clear FIFO, control register and read state.
//
// Timing, for a command whose last address bit is sampled at edge E: the
// command acts at edge E+1, so after a read-event the first bit (the chip's
// hit flag) is on the data output from E+1 and the chain shifts from E+2.
// A trigger acknowledge high at an edge stores that cycle's discriminator
// pattern. The features follow the GTFE64 description; the register
// layout, mask polarity, FIFO-full behaviour (an event is dropped) and
// the calibration pulse length are this design's choices.
module gtfe64
  import glast_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned CAL_CYCLES = 20     // 1 us at 20 MHz
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [CHIP_AW-1:0]         chip_addr,
  input  logic                       cmd_a,
  input  logic                       cmd_b,
  input  logic                       tack_a,
  input  logic                       tack_b,
  input  logic [NUM_CH-1:0][Q_W-1:0] charge,
  // data chain: *_l shifts toward the left controller, *_r toward the right
  input  logic                       data_l_in,
  output logic                       data_l_out,
  input  logic                       data_r_in,
  output logic                       data_r_out,
  // Fast-OR chain
  input  logic                       trig_from_right,
  output logic                       trig_to_left,
  input  logic                       trig_from_left,
  output logic                       trig_to_right,
  output logic                       ctrl_reg_out
);

  ctrl_reg_t ctrl;

  // ---------------- command decoders ----------------
  logic dv_a, dv_b, se_a, se_b, sb_a, sb_b;
  cmd_e dc_a, dc_b;

  gtfe_cmd_decoder u_dec_a (
    .clk, .rst_n, .cmd_in(cmd_a), .chip_addr, .selected(!ctrl.dec_sel),
    .cmd_valid(dv_a), .cmd_code(dc_a), .shift_en(se_a), .shift_bit(sb_a));

  gtfe_cmd_decoder u_dec_b (
    .clk, .rst_n, .cmd_in(cmd_b), .chip_addr, .selected(ctrl.dec_sel),
    .cmd_valid(dv_b), .cmd_code(dc_b), .shift_en(se_b), .shift_bit(sb_b));

  logic cmd_v;
  cmd_e cmd;
  assign cmd_v = dv_a || dv_b;        // at most one decoder is selected
  assign cmd   = dv_b ? dc_b : dc_a;

  logic do_read, do_end, do_cal, do_clear, do_rst_chip, do_rst_fifo;
  assign do_read     = cmd_v && cmd == CMD_READ_EVENT;
  assign do_end      = cmd_v && cmd == CMD_END_READ;
  assign do_cal      = cmd_v && cmd == CMD_CAL_STROBE;
  assign do_clear    = cmd_v && cmd == CMD_CLEAR_EVENT;
  assign do_rst_chip = cmd_v && cmd == CMD_RESET_CHIP;
  assign do_rst_fifo = cmd_v && cmd == CMD_RESET_FIFO;

  gtfe_ctrl_reg u_ctrl (
    .clk, .rst_n, .clear(do_rst_chip),
    .shift_en_a(se_a), .shift_bit_a(sb_a), .shift_en_b(se_b), .shift_bit_b(sb_b),
    .ctrl, .ser_out(ctrl_reg_out));

  // ---------------- DACs and analog channels ----------------
  logic [MV_W-1:0] thr_mv, cal_mv;
  gtfe_dac u_thr_dac (.setting(ctrl.thr_dac), .out_mv(thr_mv));
  gtfe_dac u_cal_dac (.setting(ctrl.cal_dac), .out_mv(cal_mv));

  logic [$clog2(CAL_CYCLES+1)-1:0] cal_cnt;
  logic cal_pulse;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cal_cnt <= '0;
    else if (do_cal)         cal_cnt <= ($clog2(CAL_CYCLES+1))'(CAL_CYCLES);
    else if (cal_cnt != 0)   cal_cnt <= cal_cnt - 1'b1;
  end
  assign cal_pulse = (cal_cnt != 0);

  logic [NUM_CH-1:0] disc;
  gtfe_analog_fe #(.NCH(NUM_CH)) u_analog (
    .charge, .thr_mv, .cal_mv, .cal_pulse, .cal_mask(ctrl.cal_mask), .disc);

  // ---------------- trigger path ----------------
  logic local_or;
  gtfe_fast_or #(.NCH(NUM_CH)) u_fast_or (
    .disc, .trig_mask(ctrl.trig_mask),
    .left_en(ctrl.trig_left_en), .right_en(ctrl.trig_right_en),
    .from_left(trig_from_left), .from_right(trig_from_right),
    .to_left(trig_to_left), .to_right(trig_to_right), .local_or);

  // ---------------- event buffer ----------------
  logic tack;
  assign tack = ctrl.dec_sel ? tack_b : tack_a;

  logic [NUM_CH-1:0] head;
  logic fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  sync_fifo #(.WIDTH(NUM_CH), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(do_rst_chip || do_rst_fifo),
    .push(tack), .din(disc & ctrl.data_mask),
    .pop(do_clear), .dout(head), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count));

  // ---------------- readout ----------------
  logic reading;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       reading <= 1'b0;
    else if (do_end || do_rst_chip)   reading <= 1'b0;
    else if (do_read)                 reading <= 1'b1;
  end

  logic [NUM_CH-1:0] rd_event;
  assign rd_event = fifo_empty ? '0 : head;

  gtfe_out_shift #(.NCH(NUM_CH)) u_shift_l (
    .clk, .rst_n, .load(do_read && !ctrl.read_right), .event_bits(rd_event),
    .shift(reading && !ctrl.read_right), .din(data_l_in), .dout(data_l_out));

  gtfe_out_shift #(.NCH(NUM_CH)) u_shift_r (
    .clk, .rst_n, .load(do_read && ctrl.read_right), .event_bits(rd_event),
    .shift(reading && ctrl.read_right), .din(data_r_in), .dout(data_r_out));

  // Only the selected decoder can issue a command.
  a_one_decoder: assert property (@(posedge clk) disable iff (!rst_n) !(dv_a && dv_b));

endmodule
