// gtfe_cmd_decoder: serial command decoder of the GTFE64 front-end chip.
//
// The chip has two of these, one fed by each readout controller. A frame is
// a start bit (1), a 3-bit command code and a 5-bit chip address, all MSB
// first on one line sampled at every clock; the line idles at 0. Code 001
// (load control register) is followed by CTRL_W data bits, which this
// decoder hands to the control register one per clock (shift_en/shift_bit);
// that command is taken whenever the address matches, selected or not. Every
// other command is reported (cmd_valid, one cycle, with cmd_code) only when
// the address matches and the control register selects this decoder. An
// address of 1F matches every chip.
//
// Timing: if the last address bit is on cmd_in at clock edge E, cmd_valid is
// high for the cycle after E. Data bits are echoed one cycle after they are
// sampled. The command set and frame layout follow the GTFE64 definition;
// the choice of a counter-based state machine (the original is an 11-bit
// hand-designed one) is this design's.
module gtfe_cmd_decoder
  import glast_pkg::*;
#(
  parameter int unsigned DATA_BITS = CTRL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_in,
  input  logic [CHIP_AW-1:0] chip_addr,
  input  logic               selected,
  output logic               cmd_valid,
  output cmd_e               cmd_code,
  output logic               shift_en,
  output logic               shift_bit
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_e;

  state_e      state;
  logic [7:0]  hdr;
  logic [$clog2(DATA_BITS+1)-1:0] cnt;
  logic        load_ok;

  logic [7:0]  hdr_next;
  logic        addr_match;
  assign hdr_next   = {hdr[6:0], cmd_in};
  assign addr_match = (hdr_next[4:0] == chip_addr) || (hdr_next[4:0] == BCAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hdr       <= '0;
      cnt       <= '0;
      load_ok   <= 1'b0;
      cmd_valid <= 1'b0;
      cmd_code  <= CMD_NOP;
      shift_en  <= 1'b0;
      shift_bit <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      shift_en  <= 1'b0;
      shift_bit <= cmd_in;
      unique case (state)
        S_IDLE: if (cmd_in) begin
          state <= S_HDR;
          cnt   <= '0;
        end
        S_HDR: begin
          hdr <= hdr_next;
          cnt <= cnt + 1'b1;
          if (cnt == 7) begin
            cnt <= '0;
            if (cmd_e'(hdr_next[7:5]) == CMD_LOAD_CTRL) begin
              state   <= S_DATA;
              load_ok <= addr_match;
            end else begin
              state     <= S_IDLE;
              cmd_valid <= addr_match && selected && (cmd_e'(hdr_next[7:5]) != CMD_NOP);
              cmd_code  <= cmd_e'(hdr_next[7:5]);
            end
          end
        end
        S_DATA: begin
          shift_en <= load_ok;
          cnt      <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(DATA_BITS - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
