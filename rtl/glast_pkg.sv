// glast_pkg: types and constants shared by the GLAST tracker readout RTL.
//
// The front-end chip (GTFE64) takes serial command frames made of a start
// bit, a 3-bit command code, a 5-bit chip address (1F addresses every chip)
// and, for "load control register" only, the control register contents.
// The eight command codes are the ones the GTFE64 defines. The control
// register layout below (field order, mask polarity, direction bits) is a
// choice of this design: the chip's feature list names the masks, the two
// 7-bit DACs and the decoder select bit, but not how they are packed.
package glast_pkg;

  localparam int unsigned NUM_CH    = 64;     // channels per GTFE64
  localparam int unsigned CHIP_AW   = 5;      // chip address width
  localparam logic [4:0]  BCAST     = 5'h1F;  // address of all chips
  localparam int unsigned HDR_BITS  = 9;      // start + code + address
  localparam int unsigned DAC_W     = 7;      // 6-bit code + range bit
  localparam int unsigned Q_W       = 12;     // charge, units of 0.01 fC
  localparam int unsigned MV_W      = 12;     // DAC/shaper level in mV

  typedef enum logic [2:0] {
    CMD_NOP         = 3'b000,
    CMD_LOAD_CTRL   = 3'b001,
    CMD_READ_EVENT  = 3'b010,
    CMD_CAL_STROBE  = 3'b011,
    CMD_CLEAR_EVENT = 3'b100,
    CMD_RESET_CHIP  = 3'b101,
    CMD_RESET_FIFO  = 3'b110,
    CMD_END_READ    = 3'b111
  } cmd_e;

  // Control register, sent MSB first: dec_sel is the first bit on the line.
  // A mask bit of 1 enables the channel (pulsed / read out / in the trigger).
  typedef struct packed {
    logic                dec_sel;        // 0: decoder A (left), 1: decoder B (right)
    logic                read_right;     // 0: shift data left, 1: shift data right
    logic                trig_left_en;   // drive the Fast-OR to the left neighbour
    logic                trig_right_en;  // drive the Fast-OR to the right neighbour
    logic [DAC_W-1:0]    thr_dac;        // {range, code[5:0]}
    logic [DAC_W-1:0]    cal_dac;        // {range, code[5:0]}
    logic [NUM_CH-1:0]   cal_mask;
    logic [NUM_CH-1:0]   data_mask;
    logic [NUM_CH-1:0]   trig_mask;
  } ctrl_reg_t;

  localparam int unsigned CTRL_W = $bits(ctrl_reg_t);   // 210

  // Controller-to-tower event record: a choice of this design.
  localparam int unsigned STRIP_W  = 11;   // 25 chips x 64 strips = 1600 < 2048
  localparam int unsigned LAYER_W  = 4;
  localparam int unsigned CNT_W    = 7;
  localparam int unsigned TOT_W    = 8;
  localparam int unsigned REC_HDR_BITS = 1 + LAYER_W + CNT_W + 1 + TOT_W;  // 21

endpackage
