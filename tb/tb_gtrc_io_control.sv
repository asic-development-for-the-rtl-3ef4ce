// tb_gtrc_io_control: checks the token-controlled event output. Two
// modelled event buffers are filled with random hit lists; for each token
// the serial record is captured and decoded (start bit, layer, count,
// overflow, TOT, addresses), the buffer must be released and the token
// passed on right after the last bit. Also checks waiting for an event when
// the token comes first, alternate buffer use, and that data from the layer
// above is forwarded with one cycle of delay.
module tb_gtrc_io_control;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic [3:0] layer_id = 4'd6;
  logic token_in = 0, token_out, data_in = 0, data_out, rd_sel, release_buf;
  logic [5:0] rd_idx;
  logic [1:0] buf_full = 0;
  logic [6:0] cnt [2];
  logic ovf [2];
  logic [7:0] tt [2];
  logic [10:0] mem [2][64];
  logic [6:0] buf_count;
  logic buf_overflow;
  logic [7:0] buf_tot;
  logic [10:0] buf_data;
  assign buf_count = cnt[rd_sel];
  assign buf_overflow = ovf[rd_sel];
  assign buf_tot = tt[rd_sel];
  assign buf_data = mem[rd_sel][rd_idx];

  gtrc_io_control #(.DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int n_rel[2], n_tok;
  always @(posedge clk) begin
    if (release_buf) begin n_rel[rd_sel]++; buf_full[rd_sel] <= 1'b0; end
    if (token_out) n_tok++;
  end

  task automatic get(int n, output int v);
    v = 0;
    for (int i = 0; i < n; i++) begin @(negedge clk); v = (v << 1) | int'(data_out); end
  endtask

  task automatic fill(int b, int n);
    cnt[b] = 7'(n); ovf[b] = (n == 64); tt[b] = 8'($urandom);
    for (int i = 0; i < n; i++) mem[b][i] = 11'($urandom % 1600);
    buf_full[b] = 1'b1;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int t = 0; t < 8; t++) begin
      int b, n, v, g, tok0;
      b = t % 2;
      n = (t == 2) ? 0 : (t == 5) ? 64 : 1 + $urandom % 20;
      if (t != 3) fill(b, n);
      tok0 = n_tok;
      token_in = 1; @(negedge clk); token_in = 0;
      if (t == 3) begin                    // token before the event
        repeat (30) begin @(negedge clk); check(!data_out, "silent while waiting"); end
        fill(b, n);
      end
      g = 0;
      while (!data_out && g < 1000) begin @(negedge clk); g++; end
      get(LAYER_W, v); check(v == 6, "layer id");
      get(CNT_W, v);   check(v == n, $sformatf("count %0d/%0d", v, n));
      get(1, v);       check(v == int'(ovf[b]), "overflow bit");
      get(TOT_W, v);   check(v == int'(tt[b]), "tot");
      for (int i = 0; i < n; i++) begin
        get(STRIP_W, v); check(v == int'(mem[b][i]), "address");
      end
      @(negedge clk);
      check(n_tok == tok0 + 1, "token passed right after record");
      check(buf_full[b] == 1'b0, "buffer released");
      repeat (2) @(negedge clk);
    end
    check(n_rel[0] == 4 && n_rel[1] == 4, "buffers used alternately");
    // forwarding from the layer above
    for (int i = 0; i < 50; i++) begin
      logic b;
      b = 1'($urandom);
      data_in = b;
      @(negedge clk);
      check(data_out == b, "forwarded with one cycle delay");
    end
    data_in = 0;
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
