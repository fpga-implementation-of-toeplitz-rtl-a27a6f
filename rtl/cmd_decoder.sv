// Command decoder: host command bytes to configuration settings.
//
// Each command is one byte, opcode in the upper nibble and argument in the
// lower one (opcodes in trng_pkg::opcode_e): choose the output link, choose
// the output source (extractor or DDR3 readback), route raw ADC data to the
// extractor or to DDR3, move the bits kept by data select, and start or stop
// output streaming. The settings are held in cfg and start at
// trng_pkg::CFG_RESET. An unknown opcode or a link number above 2 changes
// nothing and pulses bad_cmd.
// Interface: cmd_valid/cmd_byte from transmission control. Timing: cfg changes
// one clock after the byte.
// That the board takes commands from the host through transmission control is
// published; the command set and its encoding are choices of this design.
module cmd_decoder (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cmd_valid,
  input  logic [7:0]     cmd_byte,
  output trng_pkg::cfg_t cfg,
  output logic           bad_cmd
);
  import trng_pkg::*;

  logic [3:0] op;
  logic [3:0] arg;

  assign op  = cmd_byte[7:4];
  assign arg = cmd_byte[3:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg     <= CFG_RESET;
      bad_cmd <= 1'b0;
    end else begin
      bad_cmd <= 1'b0;
      if (cmd_valid) begin
        case (op)
          OP_LINK: begin
            if (arg[1:0] <= 2'd2 && arg[3:2] == 2'b00) cfg.link <= link_e'(arg[1:0]);
            else                                       bad_cmd  <= 1'b1;
          end
          OP_SOURCE: cfg.src_ddr3   <= arg[0];
          OP_ROUTE:  cfg.route_ddr3 <= arg[0];
          OP_SHIFT:  cfg.sel_shift  <= arg[1:0];
          OP_TX_EN:  cfg.tx_en      <= arg[0];
          default:   bad_cmd        <= 1'b1;
        endcase
      end
    end
  end
endmodule
