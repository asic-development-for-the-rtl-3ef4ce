// gtfe_analog_fe: behavioural model of the GTFE64 analog channels
// (preamplifier, shaping amplifier and discriminator) for NCH strips.
//
// Not synthesizable silicon: the real channels are analog circuits. The
// model keeps what the digital logic sees. Each channel's charge (units of
// 0.01 fC, held for as long as the strip signal should be over threshold)
// plus, while cal_pulse is high and the channel's calibration mask bit is
// set, the calibration charge (calibration DAC voltage into a 42 fF
// capacitor) is turned into a shaper pulse height with a gain of 125 mV/fC,
// and the discriminator output is high while that height exceeds the
// threshold DAC voltage. Shaping delay, pulse shape, noise and threshold
// spread are not modelled, so the output follows the input at once and
// the time over threshold equals the time the input is held.
module gtfe_analog_fe
  import glast_pkg::*;
#(
  parameter int unsigned NCH            = 64,
  parameter int unsigned GAIN_MV_PER_FC = 125,
  parameter int unsigned CCAL_FF        = 42
) (
  input  logic [NCH-1:0][Q_W-1:0] charge,
  input  logic [MV_W-1:0]         thr_mv,
  input  logic [MV_W-1:0]         cal_mv,
  input  logic                    cal_pulse,
  input  logic [NCH-1:0]          cal_mask,
  output logic [NCH-1:0]          disc
);

  // Calibration charge in 0.01 fC: mV x fF = 1e-18 C = 0.1 x (0.01 fC).
  logic [23:0] q_cal;
  assign q_cal = (24'(cal_mv) * 24'(CCAL_FF)) / 24'd10;

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      logic [23:0] q, pulse_mv;
      q        = 24'(charge[i]) + ((cal_pulse && cal_mask[i]) ? q_cal : 24'd0);
      pulse_mv = (q * 24'(GAIN_MV_PER_FC)) / 24'd100;
      disc[i]  = pulse_mv > 24'(thr_mv);
    end
  end

endmodule
