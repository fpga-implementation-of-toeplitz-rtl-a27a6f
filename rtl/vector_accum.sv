// Phase III of the Toeplitz extractor: bitwise accumulation.
//
// Adds (XORs) the n/k intermediate m-bit column vectors of one block. The
// vector tagged first restarts the sum; when the vector tagged last arrives
// the finished m-bit result is registered and out_valid pulses for one clock.
// Interface: in_valid/in_first/in_last/in_vec from phase II; out_valid and
// out_bits (the m extracted bits, bit i-1 = r_i).
// Timing: one register stage; the result appears one clock after the last
// vector. The XOR accumulation follows the published scheme; the tags and the
// output register are choices of this design.
module vector_accum #(
  parameter int unsigned M = toeplitz_pkg::M_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [M-1:0]  in_vec,
  output logic          out_valid,
  output logic [M-1:0]  out_bits
);
  logic [M-1:0] acc;
  logic [M-1:0] acc_next;

  assign acc_next = (in_first ? '0 : acc) ^ in_vec;

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && in_last;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      acc <= acc_next;
      if (in_last) out_bits <= acc_next;
    end
  end
endmodule
