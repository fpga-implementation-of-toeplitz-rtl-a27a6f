// Testbench of data select and deserializer at the design sizes (8 samples of
// 8 bits per 125 MHz word, 5 bits kept, 80-bit raw words at 62.5 MHz, the
// slow clock derived from the fast one). Random ADC words arrive with random
// gaps and with the selection offset changed at times; the testbench selects
// and packs the bits itself and checks every raw word that comes out, their
// number, that overflow stays low, and that the output rate keeps up with an
// unbroken input stream (no FIFO overflow at full rate).
module tb_data_select_deser;
  localparam int SAMPLE_W = 8, SAMPLES = 8, SEL_W = 5, K = 80, PW = 40;
  logic clk_adc = 0, clk_sys = 0, rst_adc_n = 0, rst_sys_n = 0;
  logic [1:0] sel_shift = 0;
  logic in_valid = 0;
  logic [63:0] in_data = '0;
  logic overflow, out_valid;
  logic [K-1:0] out_raw;
  int checks = 0, failures = 0;
  bit bits_q[$];
  int nout = 0, nin = 0;

  data_select_deser #(.K(K)) dut (.*);

  always #4 clk_adc = ~clk_adc;
  always @(posedge clk_adc) clk_sys <= ~clk_sys;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input side, driven at the falling edge
  initial begin
    repeat (4) @(posedge clk_sys);
    @(negedge clk_adc);
    rst_adc_n = 1; rst_sys_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit v;
      logic [63:0] x;
      @(negedge clk_adc);
      v = (t < 1000) ? 1'b1 : 1'($urandom);
      if (t % 250 == 0) sel_shift = 2'($urandom);
      x = {$urandom, $urandom};
      in_valid = v;
      in_data = x;
      if (v) begin
        nin++;
        for (int s = 0; s < SAMPLES; s++)
          for (int b = 0; b < SEL_W; b++) bits_q.push_back(x[s*SAMPLE_W + sel_shift + b]);
      end
    end
    @(negedge clk_adc);
    in_valid = 0;
    repeat (20) @(posedge clk_sys);
    checks++;
    if (nout != nin / 2 || overflow) begin
      failures++;
      $display("words out %0d, expected %0d, overflow %b", nout, nin / 2, overflow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk_sys) begin
    if (rst_sys_n && out_valid) begin
      logic [K-1:0] e;
      for (int b = 0; b < K; b++) e[b] = bits_q[nout*K + b];
      checks++;
      if (out_raw !== e) begin
        failures++;
        $display("word %0d: %h exp %h", nout, out_raw, e);
      end
      nout++;
    end
  end
endmodule
