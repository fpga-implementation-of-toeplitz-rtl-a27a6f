// Shared sizes of the Toeplitz hashing extractor.
//
// An m x n binary Toeplitz matrix hashes n raw bits into m output bits. The
// matrix is defined by m+n-1 seed bits t_1..t_{m+n-1}; entry (row i, column j),
// both counted from 1, is t_{m-i+j}. The hash is cut into n/k steps of k
// columns each, one step per clock. The default sizes (m = 1024, n = 1520,
// k = 80) are the configuration the design was built for: at 62.5 MHz it turns
// 5 Gbit/s of raw bits into 1024 * 62.5e6 / 19 = 3.37 Gbit/s of output.
// Seed bit t_p is held in bit p-1 of a seed vector; raw bit d_j in bit j-1.
package toeplitz_pkg;
  localparam int unsigned M_BITS = 1024;  // extracted bits per block (m)
  localparam int unsigned N_BITS = 1520;  // raw bits per block (n)
  localparam int unsigned K_BITS = 80;    // raw bits per clock (k)
endpackage
