// Output source selector in front of the output FIFO.
//
// With src_ddr3 low, each m-bit extracted word is split into m/W beats of W
// bits (lowest beat first) and written into the FIFO, one beat per clock while
// the FIFO has room. With src_ddr3 high, W-bit words read back from DDR3 are
// passed into the FIFO under a valid/ready handshake. The extractor cannot be
// stalled, so an extracted word that arrives while the previous one is still
// being written, or while DDR3 readback is selected, is discarded and ext_drop
// pulses.
// Interface: ext_valid/ext_bits from the extractor, ddr_valid/ddr_data/ddr_ready
// from the DDR3 readback, fifo_wr/fifo_data/fifo_full towards the FIFO, all in
// one clock domain. Timing: the first beat is written the clock after
// ext_valid; the DDR3 path has no register.
// The two sources and their widths are the published ones; the beat split,
// the handshake and the drop policy are choices of this design.
module output_mux #(
  parameter int unsigned M = toeplitz_pkg::M_BITS,
  parameter int unsigned W = trng_pkg::DDR3_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         src_ddr3,
  input  logic         ext_valid,
  input  logic [M-1:0] ext_bits,
  output logic         ext_drop,
  input  logic         ddr_valid,
  input  logic [W-1:0] ddr_data,
  output logic         ddr_ready,
  output logic         fifo_wr,
  output logic [W-1:0] fifo_data,
  input  logic         fifo_full
);
  localparam int unsigned BEATS = M / W;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  initial begin
    assert (M % W == 0) else $fatal(1, "M must be a multiple of W");
  end

  logic          busy;
  logic [BW-1:0] beat;
  logic [M-1:0]  hold;
  logic          beat_wr;

  assign beat_wr   = busy && !fifo_full;
  assign ddr_ready = src_ddr3 && !busy && !fifo_full;
  assign fifo_wr   = beat_wr || (ddr_valid && ddr_ready);
  assign fifo_data = busy ? hold[beat*W +: W] : ddr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      beat     <= '0;
      ext_drop <= 1'b0;
    end else begin
      ext_drop <= ext_valid && (busy || src_ddr3);
      if (beat_wr) begin
        if (beat == BW'(BEATS - 1)) begin
          busy <= 1'b0;
          beat <= '0;
        end else begin
          beat <= beat + 1'b1;
        end
      end
      if (ext_valid && !busy && !src_ddr3) busy <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ext_valid && !busy && !src_ddr3) hold <= ext_bits;
  end
endmodule
