// Testbench of the phase I seed-window selector at a reduced size (m = 8,
// n = 12, k = 4, three steps per block). Raw words arrive with random idle
// clocks; each registered output is checked one clock later against the seed
// window t_{sk+1}..t_{sk+m+k-1} of its step, the raw word and the first/last
// tags worked out by the testbench's own step count.
module tb_matrix_builder;
  localparam int M = 8, N = 12, K = 4, STEPS = N / K;
  logic clk = 0, rst_n = 0;
  logic [M+N-2:0] seed;
  logic in_valid = 0;
  logic [K-1:0] in_raw = '0;
  logic out_valid, out_first, out_last;
  logic [M+K-2:0] out_window;
  logic [K-1:0] out_raw;
  int checks = 0, failures = 0;

  matrix_builder #(.M(M), .N(N), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step = 0;
    seed = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 40; w++) begin
      logic [K-1:0] raw;
      logic [M+K-2:0] exp_win;
      raw = K'($urandom);
      for (int b = 0; b < M + K - 1; b++) exp_win[b] = seed[step*K + b];
      in_valid <= 1;
      in_raw <= raw;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      checks++;
      if (!out_valid || out_window !== exp_win || out_raw !== raw ||
          out_first !== (step == 0) || out_last !== (step == STEPS - 1)) begin
        failures++;
        $display("word %0d step %0d: v=%b win=%h exp=%h f=%b l=%b", w, step, out_valid,
                 out_window, exp_win, out_first, out_last);
      end
      step = (step + 1) % STEPS;
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("valid without input");
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
