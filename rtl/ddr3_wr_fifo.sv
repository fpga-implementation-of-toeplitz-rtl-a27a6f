// Write buffer of the optional DDR3 recording path.
//
// Collects 64-bit raw ADC words (clk_adc domain) into 256-bit words, the
// earliest ADC word in the low bits, and passes them through a dual-clock FIFO
// to the clock of the DDR3 memory controller, which reads them first-word-fall-
// through (rd_data valid while rd_empty is low, rd_en takes the word).
// overflow is a sticky clk_adc flag set when a 256-bit word met a full FIFO.
// Timing: a 256-bit word is written one clk_adc cycle after its fourth ADC
// word and is visible about three clk_ddr cycles later.
// The 256-bit output width is the published one; the packing order, the depth
// and the handshake are choices of this design.
module ddr3_wr_fifo #(
  parameter int unsigned IN_W  = trng_pkg::SDR_W,
  parameter int unsigned OUT_W = trng_pkg::DDR3_W,
  parameter int unsigned AW    = 4
) (
  input  logic             clk_adc,
  input  logic             rst_adc_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             overflow,
  input  logic             clk_ddr,
  input  logic             rst_ddr_n,
  input  logic             rd_en,
  output logic [OUT_W-1:0] rd_data,
  output logic             rd_empty
);
  localparam int unsigned WORDS = OUT_W / IN_W;
  localparam int unsigned CW    = (WORDS > 1) ? $clog2(WORDS) : 1;

  initial begin
    assert (OUT_W % IN_W == 0 && WORDS > 1) else $fatal(1, "OUT_W must be a multiple of IN_W");
  end

  logic [OUT_W-1:0] pack;
  logic [OUT_W-1:0] packed_word;
  logic [CW-1:0]    cnt;
  logic             wr_en;
  logic [OUT_W-1:0] wr_data;
  logic             wr_full;

  assign packed_word = {in_data, pack[OUT_W-1:IN_W]};

  always_ff @(posedge clk_adc) begin
    if (!rst_adc_n) begin
      cnt      <= '0;
      wr_en    <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(WORDS - 1)) begin
          cnt   <= '0;
          wr_en <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (wr_en && wr_full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk_adc) begin
    if (in_valid) begin
      pack    <= packed_word;
      wr_data <= packed_word;
    end
  end

  async_fifo #(.W(OUT_W), .AW(AW)) u_fifo (
    .wr_clk(clk_adc), .wr_rst_n(rst_adc_n), .wr_en, .wr_data, .wr_full,
    .rd_clk(clk_ddr), .rd_rst_n(rst_ddr_n), .rd_en, .rd_data, .rd_empty
  );
endmodule
