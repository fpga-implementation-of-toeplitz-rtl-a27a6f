// Testbench of the raw data router. Random words with random valid are sent
// while the route bit changes at random; one clock later exactly the chosen
// output must be valid and carry the word, and never both.
module tb_input_router;
  logic clk = 0, rst_n = 0, route_ddr3 = 0, in_valid = 0;
  logic [63:0] in_data = '0;
  logic ext_valid, ddr_valid;
  logic [63:0] ext_data, ddr_data;
  int checks = 0, failures = 0, n_ext = 0, n_ddr = 0;

  input_router #(.W(64)) dut (.*);
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
    for (int t = 0; t < 500; t++) begin
      logic v, r;
      logic [63:0] x;
      v = 1'($urandom);
      r = 1'($urandom);
      x = {$urandom, $urandom};
      in_valid <= v; route_ddr3 <= r; in_data <= x;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (ext_valid !== (v && !r) || ddr_valid !== (v && r) ||
          (ext_valid && ext_data !== x) || (ddr_valid && ddr_data !== x)) begin
        failures++;
        $display("t=%0d v=%b r=%b ext=%b ddr=%b", t, v, r, ext_valid, ddr_valid);
      end
      if (ext_valid) n_ext++;
      if (ddr_valid) n_ddr++;
    end
    checks++;
    if (n_ext == 0 || n_ddr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
