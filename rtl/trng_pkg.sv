// Types and constants shared by the acquisition, routing and transmission
// blocks around the Toeplitz extractor.
//
// The board samples the noise signal with an 8-bit ADC at 1 GS/s. The ADC
// delivers four samples per edge of its 125 MHz data clock on a 32-bit
// double-data-rate bus, which becomes eight samples (64 bits) per clock after
// the input DDR registers. Commands arrive as single bytes from any of the
// three host links; the upper nibble is the opcode, the lower the argument.
// The command set and the field encodings are choices of this design.
package trng_pkg;
  localparam int unsigned SAMPLE_W    = 8;   // ADC resolution
  localparam int unsigned DDR_W       = 32;  // ADC bus width, four samples
  localparam int unsigned SDR_W       = 64;  // after the input DDR registers
  localparam int unsigned SEL_W       = 5;   // bits kept per sample
  localparam int unsigned DDR3_W      = 256; // DDR3 user data width
  localparam int unsigned TX_W        = 32;  // beat width towards a host link
  localparam int unsigned N_LINKS     = 3;   // SFP, Ethernet, USB

  typedef enum logic [1:0] {
    LINK_SFP = 2'd0,
    LINK_ETH = 2'd1,
    LINK_USB = 2'd2
  } link_e;

  typedef enum logic [3:0] {
    OP_LINK    = 4'h1,  // arg[1:0]: output link
    OP_SOURCE  = 4'h2,  // arg[0]: 0 extractor, 1 DDR3 readback
    OP_ROUTE   = 4'h3,  // arg[0]: 0 raw data to extractor, 1 to DDR3
    OP_SHIFT   = 4'h4,  // arg[1:0]: lowest sample bit kept by data select
    OP_TX_EN   = 4'h5   // arg[0]: output streaming on/off
  } opcode_e;

  typedef struct packed {
    link_e      link;
    logic       src_ddr3;
    logic       route_ddr3;
    logic [1:0] sel_shift;
    logic       tx_en;
  } cfg_t;

  localparam cfg_t CFG_RESET = '{link: LINK_SFP, src_ddr3: 1'b0,
                                 route_ddr3: 1'b0, sel_shift: 2'd0, tx_en: 1'b1};
endpackage
