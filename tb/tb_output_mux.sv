// Testbench of the output source selector (m = 1024, 256-bit beats). A model
// FIFO takes beats and asserts full at random. Phase 1: extracted words every
// 19 clocks must come out as four beats, lowest first, in order. Phase 2: a
// word arriving while the previous one is still held (FIFO kept full) must be
// dropped with ext_drop. Phase 3: DDR3 readback words must pass one per
// handshake, and extracted words arriving then must be dropped.
module tb_output_mux;
  localparam int M = 1024, W = 256;
  logic clk = 0, rst_n = 0, src_ddr3 = 0;
  logic ext_valid = 0, ddr_valid = 0, fifo_full = 0;
  logic [M-1:0] ext_bits = '0;
  logic [W-1:0] ddr_data = '0;
  logic ext_drop, ddr_ready, fifo_wr;
  logic [W-1:0] fifo_data;
  int checks = 0, failures = 0, drops = 0, ddr_words = 0;
  logic [W-1:0] exp_q[$];
  bit force_full = 0;

  output_mux #(.M(M), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] x;
    for (int i = 0; i < M / 32; i++) x[i*32 +: 32] = $urandom;
    return x;
  endfunction

  // model FIFO sink, sampled at the falling edge (inputs are settled)
  always @(negedge clk) begin
    if (rst_n && fifo_wr) begin
      checks++;
      if (fifo_full) begin failures++; $display("write while full"); end
      else if (exp_q.size() == 0 || fifo_data !== exp_q[0]) begin
        failures++; $display("beat mismatch");
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (rst_n && ext_drop) drops++;
    if (rst_n && ddr_valid && ddr_ready) ddr_words++;
  end

  // full pattern, changed just after the rising edge
  always @(posedge clk) fifo_full <= force_full || ($urandom_range(0, 3) == 0);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // phase 1
    for (int w = 0; w < 20; w++) begin
      logic [M-1:0] x;
      x = rnd();
      @(negedge clk);
      ext_valid = 1; ext_bits = x;
      for (int b = 0; b < M / W; b++) exp_q.push_back(x[b*W +: W]);
      @(negedge clk);
      ext_valid = 0;
      repeat (17) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || drops != 0) begin
      failures++; $display("phase 1: %0d beats left, %0d drops", exp_q.size(), drops);
    end
    // phase 2: hold the FIFO full so the second word meets a busy selector
    force_full = 1;
    begin
      logic [M-1:0] x, y;
      x = rnd(); y = rnd();
      @(negedge clk);
      ext_valid = 1; ext_bits = x;
      for (int b = 0; b < M / W; b++) exp_q.push_back(x[b*W +: W]);
      @(negedge clk);
      ext_bits = y;           // second word, one clock later: dropped
      @(negedge clk);
      ext_valid = 0;
      repeat (3) @(negedge clk);
      force_full = 0;
      repeat (30) @(negedge clk);
    end
    checks++;
    if (drops != 1 || exp_q.size() != 0) begin
      failures++; $display("phase 2: drops %0d left %0d", drops, exp_q.size());
    end
    // phase 3: DDR3 readback
    src_ddr3 = 1;
    for (int w = 0; w < 30; w++) begin
      logic [W-1:0] x;
      x = W'(rnd());
      @(negedge clk);
      ddr_valid = 1; ddr_data = x;
      exp_q.push_back(x);
      if (w == 10) ext_valid = 1;   // extracted word during readback: dropped
      @(posedge clk);
      while (!ddr_ready) @(posedge clk);
      @(negedge clk);
      ext_valid = 0;
      ddr_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (ddr_words != 30 || exp_q.size() != 0 || drops != 2) begin
      failures++; $display("phase 3: ddr %0d left %0d drops %0d", ddr_words, exp_q.size(), drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
