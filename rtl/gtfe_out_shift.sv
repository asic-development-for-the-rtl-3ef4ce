// gtfe_out_shift: one output shift register of the GTFE64, with empty-chip
// bypass.
//
// All front-end chips of a layer form one long shift register that a
// readout controller clocks out from one end. The GTFE64 has two such
// registers, one shifting toward each neighbour; this module is one of them.
// load copies an event (one bit per channel) into the register; each cycle
// with shift high moves the chain one place, taking din from the neighbour
// further from the controller and presenting dout to the nearer one.
//
// Bypass: the first bit a chip presents is a flag, 1 if its event has any
// hit. A chip with hits then presents its NCH channel bits, channel 0 first,
// before passing on its neighbours' data. An empty chip presents only its
// 0 flag and is otherwise a single flip-flop in the chain, so the controller
// reads NUM_FE + NCH * (chips with hits) bits. The flag encoding is this
// design's way of doing the bypass the chip provides.
module gtfe_out_shift #(
  parameter int unsigned NCH = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [NCH-1:0] event_bits,
  input  logic           shift,
  input  logic           din,
  output logic           dout
);

  logic           head;    // flag at load time, then the bit nearest the output
  logic           keep;    // this chip has hits: its data bits are in the chain
  logic [NCH-1:0] body;    // body[NCH-1] leaves next

  function automatic logic [NCH-1:0] reverse(input logic [NCH-1:0] v);
    for (int i = 0; i < NCH; i++) reverse[NCH-1-i] = v[i];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= 1'b0;
      keep <= 1'b0;
      body <= '0;
    end else if (load) begin
      head <= |event_bits;
      keep <= |event_bits;
      body <= reverse(event_bits);
    end else if (shift) begin
      if (keep) begin
        head <= body[NCH-1];
        body <= {body[NCH-2:0], din};
      end else begin
        head <= din;
      end
    end
  end

  assign dout = head;

endmodule
