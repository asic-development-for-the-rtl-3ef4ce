// tb_gtfe_dac: checks the DAC model at every setting against the nominal
// steps, 6 mV per code in the low range and 24 mV in the high range.
module tb_gtfe_dac;
  logic [6:0] setting;
  logic [11:0] out_mv;
  gtfe_dac dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int s = 0; s < 128; s++) begin
      setting = 7'(s);
      #1;
      checks++;
      if (int'(out_mv) != (s % 64) * (s >= 64 ? 24 : 6)) begin
        failures++;
        $display("FAIL setting %0d -> %0d", s, out_mv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
