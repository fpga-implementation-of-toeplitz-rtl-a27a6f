// Transmission control: output streaming and command reception.
//
// Output: takes W-bit words from the output FIFO (first-word-fall-through) and
// sends each as W/TX_W beats of TX_W bits, lowest beat first, to one of the
// three host links (0 SFP transceiver, 1 Ethernet MAC, 2 USB interface) under a
// valid/ready handshake. The link is chosen by cfg_link when a word is taken
// from the FIFO and kept for all its beats; cfg_tx_en low stops taking new
// words, so the FIFO fills up.
// Input: command bytes from the three links (rx_valid/rx_data/rx_ready) are
// passed on, one per clock, to the command decoder; when several links offer
// a byte at once the lowest-numbered link is served first.
// Timing: a word taken at one clock shows its first beat at the next; a
// command byte reaches cmd_valid/cmd_byte one clock after its handshake.
// The three links are the published ones; the beat width, the handshakes and
// the priority are choices of this design.
module tx_control #(
  parameter int unsigned W     = trng_pkg::DDR3_W,
  parameter int unsigned TX_W  = trng_pkg::TX_W,
  parameter int unsigned LINKS = trng_pkg::N_LINKS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  trng_pkg::link_e       cfg_link,
  input  logic                  cfg_tx_en,
  input  logic                  fifo_empty,
  input  logic [W-1:0]          fifo_data,
  output logic                  fifo_rd,
  output logic [TX_W-1:0]       tx_data,
  output logic [LINKS-1:0]      tx_valid,
  input  logic [LINKS-1:0]      tx_ready,
  input  logic [LINKS-1:0]      rx_valid,
  input  logic [LINKS-1:0][7:0] rx_data,
  output logic [LINKS-1:0]      rx_ready,
  output logic                  cmd_valid,
  output logic [7:0]            cmd_byte
);
  localparam int unsigned BEATS = W / TX_W;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned LW    = (LINKS > 1) ? $clog2(LINKS) : 1;

  initial begin
    assert (W % TX_W == 0) else $fatal(1, "W must be a multiple of TX_W");
  end

  logic          busy;
  logic [BW-1:0] beat;
  logic [W-1:0]  hold;
  logic [LW-1:0] link;
  logic          beat_done;

  assign fifo_rd   = !busy && !fifo_empty && cfg_tx_en;
  assign beat_done = busy && tx_ready[link];
  assign tx_data   = hold[beat*TX_W +: TX_W];

  always_comb begin
    tx_valid = '0;
    if (busy) tx_valid[link] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      beat <= '0;
      link <= '0;
    end else if (fifo_rd) begin
      busy <= 1'b1;
      beat <= '0;
      link <= (int'(cfg_link) < LINKS) ? LW'(cfg_link) : '0;
    end else if (beat_done) begin
      if (beat == BW'(BEATS - 1)) busy <= 1'b0;
      beat <= beat + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fifo_rd) hold <= fifo_data;
  end

  // Command bytes: fixed priority, lowest link first.
  always_comb begin
    rx_ready = '0;
    for (int l = LINKS - 1; l >= 0; l--) begin
      if (rx_valid[l]) rx_ready = LINKS'(1) << l;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd_valid <= 1'b0;
      cmd_byte  <= '0;
    end else begin
      cmd_valid <= |rx_valid;
      for (int l = 0; l < LINKS; l++) begin
        if (rx_ready[l]) cmd_byte <= rx_data[l];
      end
    end
  end

  // A beat on offer stays on offer, unchanged, until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (|(tx_valid & ~tx_ready)) |=> $stable(tx_valid) && $stable(tx_data));
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tx_valid));
endmodule
