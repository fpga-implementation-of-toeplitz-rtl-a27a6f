// Testbench of the phase III accumulator at m = 32. Blocks of random length
// (1 to 6 vectors, with idle clocks in between) are sent with first/last tags;
// the result must be the XOR of the block's vectors, appear one clock after
// the last one, and out_valid must pulse exactly once per block.
module tb_vector_accum;
  localparam int M = 32;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [M-1:0] in_vec = '0;
  logic out_valid;
  logic [M-1:0] out_bits;
  int checks = 0, failures = 0, pulses = 0;

  vector_accum #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && out_valid) pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 100; b++) begin
      int len;
      logic [M-1:0] exp_r;
      len = $urandom_range(1, 6);
      exp_r = '0;
      for (int v = 0; v < len; v++) begin
        logic [M-1:0] x;
        x = $urandom;
        exp_r ^= x;
        in_valid <= 1; in_vec <= x; in_first <= (v == 0); in_last <= (v == len - 1);
        @(posedge clk);
        in_valid <= 0;
        if (v != len - 1) begin
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("early result"); end
          repeat ($urandom_range(0, 1)) @(posedge clk);
        end
      end
      @(negedge clk);
      checks++;
      if (!out_valid || out_bits !== exp_r) begin
        failures++;
        $display("block %0d got %h exp %h v=%b", b, out_bits, exp_r, out_valid);
      end
      @(posedge clk);
    end
    checks++;
    if (pulses != 100) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
