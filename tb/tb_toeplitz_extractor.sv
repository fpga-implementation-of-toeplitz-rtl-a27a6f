// Testbench of the Toeplitz extractor at its full size (m = 1024, n = 1520,
// k = 80) with a random seed. Phase 1 feeds a raw word every clock and checks
// each 1024-bit result against a direct full-matrix product, the 3-clock
// latency after the last word of a block and the 19-clock spacing of the
// results (3.37 Gbit/s at 62.5 MHz). Phase 2 inserts random idle clocks
// between raw words and checks the results again.
module tb_toeplitz_extractor;
  import tb_ref_pkg::*;
  localparam int M = 1024, N = 1520, K = 80, STEPS = N / K;
  localparam int BLOCKS1 = 4, BLOCKS2 = 3;

  logic clk = 0, rst_n = 0;
  logic [M+N-2:0] seed;
  logic in_valid = 0;
  logic [K-1:0] in_raw = '0;
  logic out_valid;
  logic [M-1:0] out_bits;
  int checks = 0, failures = 0;
  int cycle = 0;

  toeplitz_extractor #(.M(M), .N(N), .K(K)) dut (.*);

  always #8 clk = ~clk;
  always @(negedge clk) cycle++;  // stable at every rising edge

  bit seed_b[];
  bit raw_q[$];          // every raw bit accepted, in order
  int last_word_cycle[$];
  int out_cycles[$];
  int nres = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      bit d[];
      bit r[];
      d = new[N];
      for (int j = 0; j < N; j++) d[j] = raw_q[nres*N + j];
      toeplitz_ref(seed_b, d, M, r);
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < M; i++) if (out_bits[i] !== r[i]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("block %0d: %0d wrong bits", nres, bad);
        end
      end
      out_cycles.push_back(cycle);
      nres++;
    end
  end

  task automatic send(input bit gaps);
    for (int w = 0; w < STEPS; w++) begin
      if (gaps) begin
        int idle = $urandom_range(0, 2);
        repeat (idle) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
      for (int b = 0; b < K; b++) in_raw[b] <= 1'($urandom);
      in_valid <= 1;
      #1;
      for (int b = 0; b < K; b++) raw_q.push_back(in_raw[b]);
      @(posedge clk);
      if (w == STEPS - 1) last_word_cycle.push_back(cycle);
    end
  endtask

  initial begin
    seed_b = new[M + N - 1];
    for (int p = 0; p < M + N - 1; p++) begin
      seed_b[p] = 1'($urandom);
      seed[p] = seed_b[p];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blk = 0; blk < BLOCKS1; blk++) send(0);
    for (int blk = 0; blk < BLOCKS2; blk++) send(1);
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nres != BLOCKS1 + BLOCKS2) begin
      failures++;
      $display("expected %0d results, got %0d", BLOCKS1 + BLOCKS2, nres);
    end
    // Latency: result 3 clocks after the edge that took the last raw word.
    for (int b = 0; b < nres && b < last_word_cycle.size(); b++) begin
      checks++;
      if (out_cycles[b] - last_word_cycle[b] != 3) begin
        failures++;
        $display("block %0d latency %0d", b, out_cycles[b] - last_word_cycle[b]);
      end
    end
    // Throughput: back-to-back blocks give a result every n/k clocks.
    for (int b = 1; b < BLOCKS1 && b < nres; b++) begin
      checks++;
      if (out_cycles[b] - out_cycles[b-1] != STEPS) begin
        failures++;
        $display("spacing %0d", out_cycles[b] - out_cycles[b-1]);
      end
    end
    $display("output rate at 62.5 MHz: %0d Mbit/s", (M * 62500) / (STEPS * 1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
