// Raw data router after the input DDR registers.
//
// Sends each 64-bit ADC word either to the post-processing path (data select,
// deserializer and extractor) or to the optional DDR3 recording path, as set
// by route_ddr3. The two outputs are registered and never valid together.
// Interface: in_valid/in_data from the capture stage; ext_* and ddr_* outputs.
// Timing: one register stage. The split is the published one; its control
// bit and the register stage are choices of this design.
module input_router #(
  parameter int unsigned W = trng_pkg::SDR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         route_ddr3,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         ext_valid,
  output logic [W-1:0] ext_data,
  output logic         ddr_valid,
  output logic [W-1:0] ddr_data
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_valid <= 1'b0;
      ddr_valid <= 1'b0;
    end else begin
      ext_valid <= in_valid && !route_ddr3;
      ddr_valid <= in_valid &&  route_ddr3;
    end
  end

  always_ff @(posedge clk) begin
    ext_data <= in_data;
    ddr_data <= in_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(ext_valid && ddr_valid));
endmodule
