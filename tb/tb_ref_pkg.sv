// Reference models shared by the testbenches.
//
// toeplitz_ref multiplies n raw bits by the whole m x n Toeplitz matrix in one
// go, straight from its definition (entry (i, j), counted from 1, is seed bit
// t_{m-i+j}, held in seed[m-i+j-1]); it does not use the k-column split of the
// hardware, so it checks that split independently.
package tb_ref_pkg;
  function automatic void toeplitz_ref(input bit seed[], input bit d[], input int m,
                                       output bit r[]);
    int n = d.size();
    r = new[m];
    for (int i = 1; i <= m; i++) begin
      bit acc = 1'b0;
      for (int j = 1; j <= n; j++) acc ^= seed[m - i + j - 1] & d[j - 1];
      r[i - 1] = acc;
    end
  endfunction
endpackage
