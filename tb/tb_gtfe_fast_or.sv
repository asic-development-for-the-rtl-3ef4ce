// tb_gtfe_fast_or: self-checking test of the GTFE64 trigger logic with
// random discriminator patterns, masks, neighbour inputs and enables.
module tb_gtfe_fast_or;
  logic [63:0] disc, trig_mask;
  logic left_en, right_en, from_left, from_right, to_left, to_right, local_or;

  gtfe_fast_or #(.NCH(64)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit lo;
      disc = 64'h1 << ($urandom % 64);
      if (t % 3 == 0) disc = '0;
      if (t % 7 == 0) disc = {$urandom, $urandom};
      trig_mask = (t % 2) ? '1 : {$urandom, $urandom};
      {left_en, right_en, from_left, from_right} = 4'($urandom);
      #1;
      lo = 0;
      for (int i = 0; i < 64; i++) if (disc[i] && trig_mask[i]) lo = 1;
      checks += 3;
      if (local_or != lo) failures++;
      if (to_left != (left_en && (lo || from_right))) failures++;
      if (to_right != (right_en && (lo || from_left))) failures++;
    end
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
