// Testbench of the input DDR capture. A new random 32-bit word is driven
// shortly after every clock edge, rising and falling; at each rising edge the
// 64-bit output must hold the pair {falling-edge word, rising-edge word} of
// the previous clock period.
module tb_iddr_capture;
  logic clk = 0;
  logic [31:0] d_ddr = '0;
  logic [63:0] q;
  int checks = 0, failures = 0;
  logic [31:0] hist[$];

  iddr_capture #(.W(32)) dut (.*);

  initial begin
    repeat (4000) #5;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clock period 10; data changes 1 unit after each edge
    for (int e = 0; e < 400; e++) begin
      #4 clk = ~clk;
      #1 d_ddr = $urandom;
      hist.push_back(d_ddr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hist[2p] is launched just after rising edge p and is sampled by falling
  // edge p; hist[2p+1] is launched after falling edge p and sampled by rising
  // edge p+1. Rising edge p therefore outputs the pair taken at rising edge p-1
  // (hist[2p-3]) and falling edge p-1 (hist[2p-2]). Checked at falling edge p.
  int rises = 0;
  always @(negedge clk) begin
    rises++;
    if (rises >= 3) begin
      int p;
      p = rises - 1;
      checks++;
      if (q !== {hist[2*p-2], hist[2*p-3]}) begin
        failures++;
        $display("edge %0d q=%h exp=%h", p, q, {hist[2*p-2], hist[2*p-3]});
      end
    end
  end
endmodule
