// Toeplitz hashing randomness extractor.
//
// Hashes every n raw bits into m nearly uniform bits by multiplying them with
// an m x n binary Toeplitz matrix over GF(2). The full matrix is too large to
// multiply in one go, so it is split into n/k sub-matrices of k columns, and
// three pipelined units handle one sub-matrix per clock: matrix_builder picks
// the m+k-1 seed bits of the sub-matrix, submatrix_mult forms the m-bit partial
// product, and vector_accum XORs the n/k partial products into the result.
// Interface: one k-bit raw word per clock on in_valid/in_raw (no
// back-pressure); seed holds t_1..t_{m+n-1} (t_p in bit p-1) and stays
// constant; out_valid pulses with the m extracted bits on out_bits.
// Timing: the result of a block appears 3 clocks after its last raw
// word is accepted; with a word every clock a result appears every n/k clocks
// (19 clocks, 3.37 Gbit/s at 62.5 MHz with the default sizes).
module toeplitz_extractor #(
  parameter int unsigned M = toeplitz_pkg::M_BITS,
  parameter int unsigned N = toeplitz_pkg::N_BITS,
  parameter int unsigned K = toeplitz_pkg::K_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M+N-2:0]   seed,
  input  logic             in_valid,
  input  logic [K-1:0]     in_raw,
  output logic             out_valid,
  output logic [M-1:0]     out_bits
);

  logic           b_valid, b_first, b_last;
  logic [M+K-2:0] b_window;
  logic [K-1:0]   b_raw;
  logic           p_valid, p_first, p_last;
  logic [M-1:0]   p_vec;

  matrix_builder #(.M(M), .N(N), .K(K)) u_build (
    .clk, .rst_n, .seed, .in_valid, .in_raw,
    .out_valid(b_valid), .out_first(b_first), .out_last(b_last),
    .out_window(b_window), .out_raw(b_raw)
  );

  submatrix_mult #(.M(M), .K(K)) u_mult (
    .clk, .rst_n,
    .in_valid(b_valid), .in_first(b_first), .in_last(b_last),
    .in_window(b_window), .in_raw(b_raw),
    .out_valid(p_valid), .out_first(p_first), .out_last(p_last), .out_vec(p_vec)
  );

  vector_accum #(.M(M)) u_acc (
    .clk, .rst_n,
    .in_valid(p_valid), .in_first(p_first), .in_last(p_last), .in_vec(p_vec),
    .out_valid, .out_bits
  );
endmodule
