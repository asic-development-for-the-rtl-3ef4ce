// tb_gtfe_analog_fe: checks the analog channel model. Random charges,
// thresholds and calibration settings; a channel must fire exactly when
// (charge + calibration charge) x 125 mV/fC exceeds the threshold, worked
// out here in real arithmetic with a 42 fF calibration capacitor.
module tb_gtfe_analog_fe;
  import glast_pkg::*;
  logic [63:0][11:0] charge;
  logic [11:0] thr_mv, cal_mv;
  logic cal_pulse;
  logic [63:0] cal_mask, disc;
  gtfe_analog_fe dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 200; t++) begin
      thr_mv = 12'($urandom % 400);
      cal_mv = 12'(($urandom % 64) * ((t % 2) ? 24 : 6));
      cal_pulse = t[1];
      cal_mask = {$urandom, $urandom};
      for (int i = 0; i < 64; i++) charge[i] = 12'($urandom % 400);
      #1;
      for (int i = 0; i < 64; i++) begin
        int qc, q, mv;
        qc = (int'(cal_mv) * 42) / 10;                 // 0.01 fC units
        q  = int'(charge[i]) + ((cal_pulse && cal_mask[i]) ? qc : 0);
        mv = (q * 125) / 100;
        checks++;
        if (disc[i] != (mv > int'(thr_mv))) failures++;
      end
    end
    // worked example: 1 fC at 90 mV threshold fires, 0.7 fC does not
    thr_mv = 12'd90; cal_pulse = 0; charge = '0;
    charge[0] = 12'd100; charge[1] = 12'd70;
    #1;
    checks += 2;
    if (!disc[0]) failures++;
    if (disc[1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
