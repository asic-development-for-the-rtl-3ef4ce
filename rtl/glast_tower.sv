// glast_tower: readout of one GLAST tracker tower, NUM_LAYERS layers of
// NUM_FE front-end chips (64 strips each) with a controller at each end.
//
// The left controllers of all layers form one column and the right
// controllers another. Within a column, the tower electronics' command and
// trigger-acknowledge lines go to every layer, and events travel down the
// column under a token: the tower gives token_in[s] to layer 0, each layer
// sends its record toward layer 0 and passes the token to the layer above,
// and layer NUM_LAYERS-1 returns it on token_done[s]. Layer 0's data output
// is the column's output. Each layer's gated Fast-OR leaves as a prompt
// trigger, trig_out[layer][side]. Controller configuration (chips per side,
// trigger gates) enters on pins; layer l's id is l.
module glast_tower
  import glast_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 16,
  parameter int unsigned NUM_FE     = 25
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic [NUM_LAYERS-1:0][NUM_FE-1:0][NUM_CH-1:0][Q_W-1:0] charge,
  input  logic [NUM_LAYERS-1:0][1:0][4:0]              nchips,
  input  logic [NUM_LAYERS-1:0][1:0]                   trig_en,
  input  logic [1:0]                                   cmd_in,
  input  logic [1:0]                                   tack_in,
  input  logic [1:0]                                   token_in,
  output logic [1:0]                                   data_out,
  output logic [1:0]                                   token_done,
  output logic [NUM_LAYERS-1:0][1:0]                   trig_out,
  output logic [NUM_LAYERS-1:0][1:0]                   busy,
  output logic [NUM_LAYERS-1:0][NUM_FE-1:0]           ctrl_reg_out
);

  logic [NUM_LAYERS-1:0][1:0] l_data_out, l_token_out, l_data_in, l_token_in;

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    if (l == 0) begin : g_bot
      assign l_token_in[l] = token_in;
    end else begin : g_up
      assign l_token_in[l] = l_token_out[l-1];
    end
    if (l == NUM_LAYERS - 1) begin : g_top
      assign l_data_in[l] = 2'b00;
    end else begin : g_mid
      assign l_data_in[l] = l_data_out[l+1];
    end

    glast_layer #(.NUM_FE(NUM_FE)) u_layer (
      .clk, .rst_n, .charge(charge[l]), .layer_id(LAYER_W'(l)),
      .nchips(nchips[l]), .trig_en(trig_en[l]),
      .cmd_in, .tack_in, .trig_out(trig_out[l]), .busy(busy[l]),
      .token_in(l_token_in[l]), .data_out(l_data_out[l]),
      .data_in(l_data_in[l]), .token_out(l_token_out[l]),
      .ctrl_reg_out(ctrl_reg_out[l]));
  end

  assign data_out   = l_data_out[0];
  assign token_done = l_token_out[NUM_LAYERS-1];

endmodule
