// Testbench of the DDR3 write buffer. Random 64-bit words arrive at 125 MHz
// with random gaps; a model DDR3 controller on its own 200 MHz clock reads
// 256-bit words at random times. Each must be four consecutive input words,
// earliest in the low bits. A second phase stops reading until the FIFO is
// full and checks that overflow is raised.
module tb_ddr3_wr_fifo;
  logic clk_adc = 0, clk_ddr = 0, rst_adc_n = 0, rst_ddr_n = 0;
  logic in_valid = 0;
  logic [63:0] in_data = '0;
  logic overflow, rd_en = 0, rd_empty;
  logic [255:0] rd_data;
  int checks = 0, failures = 0;
  logic [63:0] words[$];
  int nread = 0, nin = 0;
  bit reading = 1;

  ddr3_wr_fifo dut (.*);
  always #4 clk_adc = ~clk_adc;
  always #2.5 clk_ddr = ~clk_ddr;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk_adc);
    @(negedge clk_adc);
    rst_adc_n = 1; rst_ddr_n = 1;
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk_adc);
      in_valid = 1'($urandom);
      in_data = {$urandom, $urandom};
      if (in_valid) begin words.push_back(in_data); nin++; end
    end
    @(negedge clk_adc);
    in_valid = 0;
    repeat (40) @(posedge clk_adc);
    checks++;
    if (nread != nin / 4 || overflow) begin
      failures++;
      $display("read %0d expected %0d overflow %b", nread, nin / 4, overflow);
    end
    // overflow phase: stop the reader and keep writing
    reading = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk_adc);
      in_valid = 1;
    end
    @(negedge clk_adc);
    in_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk_ddr) begin
    rd_en = 0;
    if (rst_ddr_n && reading && !rd_empty && $urandom_range(0, 1)) begin
      logic [255:0] e;
      for (int w = 0; w < 4; w++) e[w*64 +: 64] = words[nread*4 + w];
      checks++;
      if (rd_data !== e) begin failures++; $display("word %0d wrong", nread); end
      nread++;
      rd_en = 1;
    end
  end
endmodule
