// Testbench of the phase II sub-matrix product at a reduced size (m = 16,
// k = 8). For random windows and raw words it builds the m x k Toeplitz
// sub-matrix explicitly (last row = first k window bits, every row above is
// the row below shifted by one column with the next window bit entering on
// the right) and compares the GF(2) product with the registered output; the
// first/last tags must pass through with the same one-clock delay.
module tb_submatrix_mult;
  localparam int M = 16, K = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [M+K-2:0] in_window = '0;
  logic [K-1:0] in_raw = '0;
  logic out_valid, out_first, out_last;
  logic [M-1:0] out_vec;
  int checks = 0, failures = 0;

  submatrix_mult #(.M(M), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      bit mat [M][K];
      logic [M-1:0] exp_v;
      logic [M+K-2:0] w;
      logic [K-1:0] d;
      bit f, l;
      w = (M+K-1)'({$urandom, $urandom});
      d = K'($urandom);
      f = 1'($urandom);
      l = 1'($urandom);
      // row M-1 (the last row) holds w[0..K-1]; row r-1 is row r moved one
      // column right, with window bit (M-1-(r-1))+... entering at column K-1
      for (int c = 0; c < K; c++) mat[M-1][c] = w[c];
      for (int r = M - 2; r >= 0; r--) begin
        for (int c = 0; c < K - 1; c++) mat[r][c] = mat[r+1][c+1];
        mat[r][K-1] = w[(M - 1 - r) + K - 1];
      end
      for (int r = 0; r < M; r++) begin
        bit acc;
        acc = 0;
        for (int c = 0; c < K; c++) acc ^= mat[r][c] & d[c];
        exp_v[r] = acc;
      end
      in_valid <= 1; in_window <= w; in_raw <= d; in_first <= f; in_last <= l;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      checks++;
      if (!out_valid || out_vec !== exp_v || out_first !== f || out_last !== l) begin
        failures++;
        $display("t=%0d got %h exp %h", t, out_vec, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
