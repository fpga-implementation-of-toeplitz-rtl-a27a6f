// Two-flop synchroniser for quasi-static control bits.
//
// Brings configuration bits that change rarely (written by command) into
// another clock domain. Each bit is synchronised on its own, so a multi-bit
// field may show a mix of old and new bits for one clock while it changes.
// Interface: d from any domain, q in the clk domain. Timing: two clocks.
module sync_bits #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
