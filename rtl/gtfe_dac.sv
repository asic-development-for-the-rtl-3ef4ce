// gtfe_dac: behavioural model of a GTFE64 7-bit DAC (threshold or
// calibration). Not synthesizable silicon: the real part is a current-adding
// DAC whose summed current develops a voltage across an N-well resistor.
//
// setting = {range, code[5:0]}. The output voltage above the reference is
// code x 6 mV in the low range and code x 24 mV in the high range, the
// GTFE64's nominal steps; out_mv is that voltage in whole millivolts. The
// model is ideal and linear: it leaves out the measured slope error and the
// high-range failure above about 2.6 V seen on the first test chip. Both
// step sizes are even, so out_mv[0] is always 0.
module gtfe_dac
  import glast_pkg::*;
#(
  parameter int unsigned STEP_LOW_MV  = 6,
  parameter int unsigned STEP_HIGH_MV = 24
) (
  input  logic [DAC_W-1:0] setting,
  output logic [MV_W-1:0]  out_mv
);

  logic [5:0] code;
  logic       range;
  assign code  = setting[5:0];
  assign range = setting[6];
  assign out_mv = MV_W'(code) * MV_W'(range ? STEP_HIGH_MV : STEP_LOW_MV);

endmodule
