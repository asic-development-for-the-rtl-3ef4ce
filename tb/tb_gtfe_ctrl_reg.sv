// tb_gtfe_ctrl_reg: self-checking test of the GTFE64 control register.
// Shifts random contents in through decoder A and B, checks every field
// of the decoded struct, the serial read-back of the old contents, A's
// priority, and clearing.
module tb_gtfe_ctrl_reg;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = !clk;
  logic shift_en_a = 0, shift_bit_a = 0, shift_en_b = 0, shift_bit_b = 0;
  ctrl_reg_t ctrl;
  logic ser_out;

  gtfe_ctrl_reg dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [CTRL_W-1:0] rnd();
    logic [CTRL_W-1:0] v;
    for (int i = 0; i < CTRL_W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [CTRL_W-1:0] v, old, back;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(ctrl == '0, "reset value");
    old = '0;
    for (int t = 0; t < 4; t++) begin
      v = rnd();
      for (int i = CTRL_W - 1; i >= 0; i--) begin
        back[i] = ser_out;
        if (t[0]) begin shift_en_b = 1; shift_bit_b = v[i]; end
        else      begin shift_en_a = 1; shift_bit_a = v[i]; end
        @(negedge clk);
      end
      shift_en_a = 0; shift_en_b = 0;
      check(ctrl == ctrl_reg_t'(v), $sformatf("load %0d", t));
      check(back == old, $sformatf("read-back %0d", t));
      check(ctrl.dec_sel == v[CTRL_W-1] && ctrl.trig_mask == v[63:0] &&
            ctrl.thr_dac == v[CTRL_W-5 -: 7], "field positions");
      old = v;
    end
    // A has priority over B
    shift_en_a = 1; shift_bit_a = 1; shift_en_b = 1; shift_bit_b = 0;
    @(negedge clk);
    shift_en_a = 0; shift_en_b = 0;
    check(ctrl.trig_mask[0] == 1'b1, "A priority");
    clear = 1; @(negedge clk); clear = 0;
    check(ctrl == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
