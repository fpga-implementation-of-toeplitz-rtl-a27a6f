// FPGA logic of a random number acquisition and post-processing board.
//
// A noise signal is digitised by an 8-bit, 1 GS/s ADC. Its 32-bit DDR bus
// (four samples per edge of a 125 MHz clock) is captured into 64-bit words,
// which go either to post-processing or, for testing, to a DDR3 recorder.
// Post-processing keeps five bits of every sample, packs them into 80-bit raw
// words at 62.5 MHz and hashes each 1520 raw bits into 1024 output bits with a
// pipelined Toeplitz extractor (3.37 Gbit/s of output). The output words, or
// words read back from DDR3, are split into 256-bit beats, buffered in a
// dual-clock FIFO and streamed by transmission control to the SFP, Ethernet or
// USB link chosen by host command. Commands also select the routing, the
// output source and the bits kept per sample.
//
// Clock domains and their ports:
//   clk_adc  125 MHz ADC data clock: adc_ddr, the input router, the DDR3 write
//            side, deser_overflow, ddr3_overflow.
//   clk_sys  62.5 MHz clock derived from clk_adc: seed, the extractor, the
//            output selector, ddr3_rd_*, ext_drop.
//   clk_ddr  DDR3 controller user clock: ddr3_wr_*.
//   clk_tx   host link clock: tx_*, rx_*, bad_cmd, cfg_out.
// Each domain has its own synchronous active-low reset; all four must be
// asserted together for a few cycles of the slowest clock. Settings cross from
// clk_tx to the other domains through two-flop synchronisers.
// Outside this module (board parts, FPGA vendor macros): the ADC and its front
// end, the clock synthesiser and PLL (clk_sys), the DDR3 controller and memory
// (ddr3_* ports), the SFP transceiver, the Ethernet MAC and PHY and the USB
// interface (tx_*/rx_* ports, link 0, 1 and 2).
module trng_postproc_top #(
  parameter int unsigned M = toeplitz_pkg::M_BITS,
  parameter int unsigned N = toeplitz_pkg::N_BITS,
  parameter int unsigned K = toeplitz_pkg::K_BITS
) (
  input  logic                                      clk_adc,
  input  logic                                      rst_adc_n,
  input  logic [trng_pkg::DDR_W-1:0]                adc_ddr,
  output logic                                      deser_overflow,
  output logic                                      ddr3_overflow,

  input  logic                                      clk_sys,
  input  logic                                      rst_sys_n,
  input  logic [M+N-2:0]                            seed,
  output logic                                      ext_drop,
  input  logic                                      ddr3_rd_valid,
  input  logic [trng_pkg::DDR3_W-1:0]               ddr3_rd_data,
  output logic                                      ddr3_rd_ready,

  input  logic                                      clk_ddr,
  input  logic                                      rst_ddr_n,
  input  logic                                      ddr3_wr_en,
  output logic [trng_pkg::DDR3_W-1:0]               ddr3_wr_data,
  output logic                                      ddr3_wr_empty,

  input  logic                                      clk_tx,
  input  logic                                      rst_tx_n,
  output logic [trng_pkg::TX_W-1:0]                 tx_data,
  output logic [trng_pkg::N_LINKS-1:0]              tx_valid,
  input  logic [trng_pkg::N_LINKS-1:0]              tx_ready,
  input  logic [trng_pkg::N_LINKS-1:0]              rx_valid,
  input  logic [trng_pkg::N_LINKS-1:0][7:0]         rx_data,
  output logic [trng_pkg::N_LINKS-1:0]              rx_ready,
  output logic                                      bad_cmd,
  output trng_pkg::cfg_t                            cfg_out
);
  import trng_pkg::*;

  localparam int unsigned OUT_AW = 4;

  // ---- configuration (clk_tx) and its copies in the other domains ----
  cfg_t       cfg;
  logic       cmd_valid;
  logic [7:0] cmd_byte;
  logic [2:0] adc_ctl;      // {route_ddr3, sel_shift}
  logic       src_ddr3_sys;

  assign cfg_out = cfg;

  sync_bits #(.W(3)) u_sync_adc (.clk(clk_adc), .d({cfg.route_ddr3, cfg.sel_shift}), .q(adc_ctl));
  sync_bits #(.W(1)) u_sync_sys (.clk(clk_sys), .d(cfg.src_ddr3), .q(src_ddr3_sys));

  // ---- acquisition (clk_adc) ----
  logic [SDR_W-1:0] adc_word;
  logic             adc_word_valid;
  logic             ext_word_valid, ddr_word_valid;
  logic [SDR_W-1:0] ext_word, ddr_word;

  iddr_capture #(.W(DDR_W)) u_iddr (.clk(clk_adc), .d_ddr(adc_ddr), .q(adc_word));

  // The capture stage is valid once its pipeline has been filled after reset.
  always_ff @(posedge clk_adc) begin
    if (!rst_adc_n) adc_word_valid <= 1'b0;
    else            adc_word_valid <= 1'b1;
  end

  input_router #(.W(SDR_W)) u_router (
    .clk(clk_adc), .rst_n(rst_adc_n), .route_ddr3(adc_ctl[2]),
    .in_valid(adc_word_valid), .in_data(adc_word),
    .ext_valid(ext_word_valid), .ext_data(ext_word),
    .ddr_valid(ddr_word_valid), .ddr_data(ddr_word)
  );

  // ---- post-processing path ----
  logic         raw_valid;
  logic [K-1:0] raw_word;

  data_select_deser #(.K(K)) u_deser (
    .clk_adc, .rst_adc_n, .sel_shift(adc_ctl[1:0]),
    .in_valid(ext_word_valid), .in_data(ext_word), .overflow(deser_overflow),
    .clk_sys, .rst_sys_n, .out_valid(raw_valid), .out_raw(raw_word)
  );

  logic         hash_valid;
  logic [M-1:0] hash_bits;

  toeplitz_extractor #(.M(M), .N(N), .K(K)) u_ext (
    .clk(clk_sys), .rst_n(rst_sys_n), .seed,
    .in_valid(raw_valid), .in_raw(raw_word),
    .out_valid(hash_valid), .out_bits(hash_bits)
  );

  // ---- optional DDR3 recording path ----
  ddr3_wr_fifo #(.IN_W(SDR_W), .OUT_W(DDR3_W)) u_ddr3_wr (
    .clk_adc, .rst_adc_n, .in_valid(ddr_word_valid), .in_data(ddr_word),
    .overflow(ddr3_overflow),
    .clk_ddr, .rst_ddr_n, .rd_en(ddr3_wr_en), .rd_data(ddr3_wr_data), .rd_empty(ddr3_wr_empty)
  );

  // ---- output selection and buffering ----
  logic              ofifo_wr, ofifo_full, ofifo_empty, ofifo_rd;
  logic [DDR3_W-1:0] ofifo_wdata, ofifo_rdata;

  output_mux #(.M(M), .W(DDR3_W)) u_omux (
    .clk(clk_sys), .rst_n(rst_sys_n), .src_ddr3(src_ddr3_sys),
    .ext_valid(hash_valid), .ext_bits(hash_bits), .ext_drop,
    .ddr_valid(ddr3_rd_valid), .ddr_data(ddr3_rd_data), .ddr_ready(ddr3_rd_ready),
    .fifo_wr(ofifo_wr), .fifo_data(ofifo_wdata), .fifo_full(ofifo_full)
  );

  async_fifo #(.W(DDR3_W), .AW(OUT_AW)) u_ofifo (
    .wr_clk(clk_sys), .wr_rst_n(rst_sys_n), .wr_en(ofifo_wr), .wr_data(ofifo_wdata),
    .wr_full(ofifo_full),
    .rd_clk(clk_tx), .rd_rst_n(rst_tx_n), .rd_en(ofifo_rd), .rd_data(ofifo_rdata),
    .rd_empty(ofifo_empty)
  );

  // ---- host links and commands (clk_tx) ----
  tx_control #(.W(DDR3_W), .TX_W(TX_W), .LINKS(N_LINKS)) u_tx (
    .clk(clk_tx), .rst_n(rst_tx_n), .cfg_link(cfg.link), .cfg_tx_en(cfg.tx_en),
    .fifo_empty(ofifo_empty), .fifo_data(ofifo_rdata), .fifo_rd(ofifo_rd),
    .tx_data, .tx_valid, .tx_ready, .rx_valid, .rx_data, .rx_ready,
    .cmd_valid, .cmd_byte
  );

  cmd_decoder u_cmd (
    .clk(clk_tx), .rst_n(rst_tx_n), .cmd_valid, .cmd_byte, .cfg, .bad_cmd
  );
endmodule
