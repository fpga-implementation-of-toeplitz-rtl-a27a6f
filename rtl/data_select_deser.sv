// Data select and deserializer between the ADC words and the extractor.
//
// The ADC delivers eight 8-bit samples per 125 MHz clock (8 Gbit/s) while the
// extractor takes one 80-bit raw word per 62.5 MHz clock (5 Gbit/s), so only
// five bits of every sample are used. Data select keeps bits
// sel_shift .. sel_shift+SEL_W-1 of each sample (sample s of a word sits in
// bits 8s+7..8s), giving 40 bits per ADC word, sample 0 lowest. The
// deserializer packs K/40 = 2 consecutive selected groups into one 80-bit raw
// word, the earlier group in the low bits, and hands it through a small
// dual-clock FIFO to the 62.5 MHz extractor clock, where it leaves as
// out_valid/out_raw, at most one word per clock.
// Interface: in_valid/in_data/sel_shift in the clk_adc domain; out_valid/out_raw
// in the clk_sys domain; overflow is a sticky clk_adc flag set if a packed word
// met a full FIFO. Timing: about four clk_sys cycles from the last ADC word of
// a raw word to out_valid.
// The 64-bit input, the 80-bit output and the 62.5 MHz output clock are the
// published ones; keeping five bits per sample follows from those two rates;
// which bits are kept (lowest by default, movable by command), the packing
// order and the FIFO are choices of this design.
module data_select_deser #(
  parameter int unsigned SAMPLE_W = trng_pkg::SAMPLE_W,
  parameter int unsigned SAMPLES  = trng_pkg::SDR_W / trng_pkg::SAMPLE_W,
  parameter int unsigned SEL_W    = trng_pkg::SEL_W,
  parameter int unsigned K        = toeplitz_pkg::K_BITS,
  parameter int unsigned SHW      = 2,
  parameter int unsigned FIFO_AW  = 3
) (
  input  logic                        clk_adc,
  input  logic                        rst_adc_n,
  input  logic [SHW-1:0]              sel_shift,
  input  logic                        in_valid,
  input  logic [SAMPLES*SAMPLE_W-1:0] in_data,
  output logic                        overflow,
  input  logic                        clk_sys,
  input  logic                        rst_sys_n,
  output logic                        out_valid,
  output logic [K-1:0]                out_raw
);
  localparam int unsigned PW    = SAMPLES * SEL_W;   // selected bits per ADC word
  localparam int unsigned WORDS = K / PW;            // ADC words per raw word
  localparam int unsigned CW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned MAXSH = SAMPLE_W - SEL_W;

  initial begin
    assert (K % PW == 0) else $fatal(1, "K must be a multiple of the selected bits per word");
    assert (SEL_W <= SAMPLE_W) else $fatal(1, "SEL_W exceeds the sample width");
  end

  logic [PW-1:0]  sel;
  logic [K-1:0]   pack;
  logic [K-1:0]   packed_word;
  logic [CW-1:0]  cnt;
  logic           wr_en;
  logic [K-1:0]   wr_data;
  logic           wr_full;
  logic           rd_empty;
  logic [K-1:0]   rd_data;
  int unsigned    shift;

  assign shift = (int'(sel_shift) > MAXSH) ? MAXSH : int'(sel_shift);

  always_comb begin
    for (int s = 0; s < SAMPLES; s++) begin
      sel[s*SEL_W +: SEL_W] = SEL_W'(in_data[s*SAMPLE_W +: SAMPLE_W] >> shift);
    end
  end

  // New groups enter at the top and move down, so after WORDS groups the
  // earliest one sits in the low bits.
  if (WORDS > 1) begin : g_shift
    assign packed_word = {sel, pack[K-1:PW]};
  end else begin : g_noshift
    assign packed_word = sel;
  end

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

  async_fifo #(.W(K), .AW(FIFO_AW)) u_cdc (
    .wr_clk(clk_adc), .wr_rst_n(rst_adc_n), .wr_en, .wr_data, .wr_full,
    .rd_clk(clk_sys), .rd_rst_n(rst_sys_n), .rd_en(!rd_empty), .rd_data, .rd_empty
  );

  always_ff @(posedge clk_sys) begin
    if (!rst_sys_n) out_valid <= 1'b0;
    else            out_valid <= !rd_empty;
  end

  always_ff @(posedge clk_sys) begin
    if (!rd_empty) out_raw <= rd_data;
  end
endmodule
