// gtfe_ctrl_reg: control register of the GTFE64.
//
// Holds the calibration, data and trigger masks, the two DAC settings and
// the decoder-select and direction bits (layout in glast_pkg::ctrl_reg_t).
// It is a serial shift register: either command decoder may shift a bit in
// at any time (decoder A wins if both try in the same cycle), MSB first, so
// after a full load the first bit sent sits in the MSB. The bit shifted out
// of the MSB is the chip's control-register output pin, which lets a
// controller read back the previous contents while loading new ones.
// A chip reset command (clear) or the reset pin zeroes it: all channels
// masked, decoder A selected, data shifted left, Fast-OR outputs off.
// The serial organisation and the reset values are this design's choice.
module gtfe_ctrl_reg
  import glast_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      shift_en_a,
  input  logic      shift_bit_a,
  input  logic      shift_en_b,
  input  logic      shift_bit_b,
  output ctrl_reg_t ctrl,
  output logic      ser_out
);

  logic [CTRL_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sr <= '0;
    else if (clear)        sr <= '0;
    else if (shift_en_a)   sr <= {sr[CTRL_W-2:0], shift_bit_a};
    else if (shift_en_b)   sr <= {sr[CTRL_W-2:0], shift_bit_b};
  end

  assign ctrl    = ctrl_reg_t'(sr);
  assign ser_out = sr[CTRL_W-1];

endmodule
