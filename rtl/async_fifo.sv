// Dual-clock FIFO.
//
// Stores up to 2**AW words of W bits written in the wr_clk domain and read in
// the rd_clk domain. Binary read and write pointers with one extra wrap bit
// are converted to Gray code and passed through two-flop synchronisers to the
// other side, where they decide full and empty. The read side is
// first-word-fall-through: rd_data shows the oldest word whenever rd_empty is
// low, and rd_en takes it.
// Interface: wr_en/wr_data/wr_full on the write side, rd_en/rd_data/rd_empty on
// the read side; each side has its own synchronous active-low reset, and both
// must be reset together. Writing when full and reading when empty are
// ignored. Timing: a word becomes visible to the reader three read clocks
// after it is written.
module async_fifo #(
  parameter int unsigned W  = 256,
  parameter int unsigned AW = 4
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the reader
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wr_full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rd_empty = (rgray == wgray_r2);

  assign wbin_next = wbin + (AW+1)'(wr_en && !wr_full);
  assign rbin_next = rbin + (AW+1)'(rd_en && !rd_empty);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rd_data = mem[rbin[AW-1:0]];
endmodule
