// Phase II of the Toeplitz extractor: sub-matrix construction and GF(2)
// matrix-vector product.
//
// The m x k sub-matrix of one step is built from the m+k-1 seed bits of its
// window w (w[0] = t_{sk+1}): row i (1..m), column c (1..k) holds
// w[m-i+c-1]. Output bit i-1 is the XOR over c of w[m-i+c-1] AND d[c-1], so the
// product is m parallel k-input AND/XOR trees, computed in one clock.
// Interface: the window, raw word and first/last tags from phase I in; the
// m-bit intermediate column vector (bit i-1 = row i) and the tags out.
// Timing: one register stage.
// The product is the published one; the bit ordering and the single-cycle
// tree are choices of this design.
module submatrix_mult #(
  parameter int unsigned M = toeplitz_pkg::M_BITS,
  parameter int unsigned K = toeplitz_pkg::K_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [M+K-2:0]   in_window,
  input  logic [K-1:0]     in_raw,
  output logic             out_valid,
  output logic             out_first,
  output logic             out_last,
  output logic [M-1:0]     out_vec
);
  logic [M-1:0] prod;

  always_comb begin
    for (int r = 0; r < M; r++) begin
      prod[r] = ^(in_window[M-1-r +: K] & in_raw);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      out_last  <= in_last;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_vec <= prod;
  end
endmodule
