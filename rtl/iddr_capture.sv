// Input double-data-rate capture of the ADC bus.
//
// The ADC presents a new DDR_W-bit word on each edge of its data clock. The
// word of the rising edge is captured on that edge and the word of the falling
// edge on the falling edge; both are then handed on together at the next
// rising edge as one 2*DDR_W-bit single-data-rate word, the earlier (rising
// edge) word in the low half. This is the "same edge, pipelined" style of an
// FPGA input DDR register, written here as plain flip-flops.
// Interface: clk is the ADC data clock (125 MHz), d_ddr the ADC bus, q the
// 64-bit word, one per clock. Timing: q holds the pair whose rising-edge word
// arrived one clock earlier.
// The 32-to-64-bit conversion is the published one; the half ordering is a
// choice of this design.
module iddr_capture #(
  parameter int unsigned W = trng_pkg::DDR_W
) (
  input  logic           clk,
  input  logic [W-1:0]   d_ddr,
  output logic [2*W-1:0] q
);
  logic [W-1:0] rise_r;
  logic [W-1:0] fall_r;

  always_ff @(posedge clk) rise_r <= d_ddr;
  always_ff @(negedge clk) fall_r <= d_ddr;
  always_ff @(posedge clk) q      <= {fall_r, rise_r};
endmodule
