// gtfe_fast_or: trigger (Fast-OR) logic of the GTFE64.
//
// The discriminator outputs that the trigger mask enables are ORed into one
// local trigger. The trigger signal runs along the layer in either or both
// directions: the output toward the left neighbour is the OR of the local
// trigger and the trigger arriving from the right neighbour, and likewise
// the other way, so the controller at the end of the chain sees the OR of
// every chip between. Each direction's output driver is enabled by a control
// register bit (only one set is normally on, to save power); a disabled
// output is held low. Purely combinational. The OR structure follows the
// chip's block diagram; the enables holding a disabled output low are this
// design's choice.
module gtfe_fast_or #(
  parameter int unsigned NCH = 64
) (
  input  logic [NCH-1:0] disc,
  input  logic [NCH-1:0] trig_mask,
  input  logic           left_en,
  input  logic           right_en,
  input  logic           from_left,
  input  logic           from_right,
  output logic           to_left,
  output logic           to_right,
  output logic           local_or
);

  assign local_or = |(disc & trig_mask);
  assign to_left  = left_en  && (local_or || from_right);
  assign to_right = right_en && (local_or || from_left);

endmodule
