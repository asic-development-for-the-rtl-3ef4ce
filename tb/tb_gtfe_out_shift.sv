// tb_gtfe_out_shift: self-checking test of the output shift register with
// empty-chip bypass. Chains four registers like four chips, loads random
// events (some empty), shifts, and checks the bit stream at the end of the
// chain: flag then 64 channel bits (channel 0 first) for chips with hits,
// a lone 0 flag for empty chips, then the far-end input.
module tb_gtfe_out_shift;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic load = 0, shift = 0;
  logic [N-1:0][63:0] ev;
  logic [N:0] link;               // link[N] is the far-end input
  assign link[N] = 1'b1;          // far end ones, to see where the chain ends

  for (genvar i = 0; i < N; i++) begin : g
    gtfe_out_shift #(.NCH(64)) u (.clk, .rst_n, .load, .event_bits(ev[i]),
      .shift, .din(link[i+1]), .dout(link[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      bit exp_bits[$];
      exp_bits = {};
      for (int i = 0; i < N; i++) begin
        ev[i] = ($urandom % 3 == 0) ? 64'h0 : {$urandom, $urandom} & {$urandom, $urandom};
        if (i == 0 && t == 1) ev[i] = '0;
        exp_bits.push_back(ev[i] != 0);
        if (ev[i] != 0) for (int c = 0; c < 64; c++) exp_bits.push_back(ev[i][c]);
      end
      for (int k = 0; k < 3; k++) exp_bits.push_back(1'b1);
      load = 1; @(negedge clk); load = 0; shift = 1;
      foreach (exp_bits[k]) begin
        check(link[0] == exp_bits[k], $sformatf("event %0d bit %0d", t, k));
        @(negedge clk);
      end
      shift = 0;
      // a pause holds the chain
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
