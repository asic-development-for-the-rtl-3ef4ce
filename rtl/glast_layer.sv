// glast_layer: one readout layer of a GLAST tracker tower.
//
// NUM_FE GTFE64 front-end chips sit in a row between two GTRC readout
// controllers. Chip i has address i, counted from the left end. Each
// controller drives its own command and trigger-acknowledge lines to every
// chip (chip decoder A listens to the left controller, B to the right).
// The data shift register and the Fast-OR both run through the row from
// chip to adjacent chip, toward the left controller, the right one, or
// part each way: each chip's control register chooses. Reprogramming those
// bits lets the chips on either side of a dead chip be read from their own
// end without losing their data. The data and trigger inputs at the far
// end of each chain are tied low.
module glast_layer
  import glast_pkg::*;
#(
  parameter int unsigned NUM_FE = 25
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NUM_FE-1:0][NUM_CH-1:0][Q_W-1:0] charge,
  input  logic [LAYER_W-1:0]                 layer_id,
  // per side: index 0 = left controller, 1 = right controller
  input  logic [1:0][4:0]                    nchips,
  input  logic [1:0]                         trig_en,
  input  logic [1:0]                         cmd_in,
  input  logic [1:0]                         tack_in,
  output logic [1:0]                         trig_out,
  output logic [1:0]                         busy,
  input  logic [1:0]                         token_in,
  output logic [1:0]                         data_out,
  input  logic [1:0]                         data_in,
  output logic [1:0]                         token_out,
  output logic [NUM_FE-1:0]                  ctrl_reg_out
);

  logic [1:0] fe_cmd, fe_tack, fe_data, fe_trig;

  logic [NUM_FE-1:0] dl_out, dr_out, tl_out, tr_out;

  for (genvar i = 0; i < NUM_FE; i++) begin : g_fe
    gtfe64 u_fe (
      .clk, .rst_n, .chip_addr(CHIP_AW'(i)),
      .cmd_a(fe_cmd[0]), .cmd_b(fe_cmd[1]),
      .tack_a(fe_tack[0]), .tack_b(fe_tack[1]),
      .charge(charge[i]),
      .data_l_in((i == NUM_FE - 1) ? 1'b0 : dl_out[(i + 1) % NUM_FE]),
      .data_l_out(dl_out[i]),
      .data_r_in((i == 0) ? 1'b0 : dr_out[(i + NUM_FE - 1) % NUM_FE]),
      .data_r_out(dr_out[i]),
      .trig_from_right((i == NUM_FE - 1) ? 1'b0 : tl_out[(i + 1) % NUM_FE]),
      .trig_to_left(tl_out[i]),
      .trig_from_left((i == 0) ? 1'b0 : tr_out[(i + NUM_FE - 1) % NUM_FE]),
      .trig_to_right(tr_out[i]),
      .ctrl_reg_out(ctrl_reg_out[i]));
  end

  assign fe_data = {dr_out[NUM_FE-1], dl_out[0]};
  assign fe_trig = {tr_out[NUM_FE-1], tl_out[0]};

  for (genvar s = 0; s < 2; s++) begin : g_rc
    gtrc #(.NUM_FE(NUM_FE)) u_rc (
      .clk, .rst_n, .side(s == 1), .nchips(nchips[s]), .layer_id,
      .trig_en(trig_en[s]), .cmd_in(cmd_in[s]), .tack_in(tack_in[s]),
      .trig_out(trig_out[s]), .busy(busy[s]),
      .token_in(token_in[s]), .data_out(data_out[s]), .data_in(data_in[s]),
      .token_out(token_out[s]),
      .fe_cmd(fe_cmd[s]), .fe_tack(fe_tack[s]), .fe_data(fe_data[s]),
      .fe_trig(fe_trig[s]));
  end

endmodule
