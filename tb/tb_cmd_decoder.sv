// Testbench of the command decoder. Random command bytes, valid and invalid,
// are applied; a model of the command set kept by the testbench predicts the
// settings and the bad_cmd pulse after each byte.
module tb_cmd_decoder;
  import trng_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  logic [7:0] cmd_byte = '0;
  cfg_t cfg, m;
  logic bad_cmd;
  int checks = 0, failures = 0, n_bad = 0;

  cmd_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m.link = LINK_SFP; m.src_ddr3 = 0; m.route_ddr3 = 0; m.sel_shift = 0; m.tx_en = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (cfg !== m) begin failures++; $display("reset value"); end
    for (int t = 0; t < 600; t++) begin
      logic [7:0] c;
      bit v, bad;
      c = 8'($urandom);
      if ($urandom_range(0, 2) != 0) c[7:4] = 4'($urandom_range(1, 5));
      v = 1'($urandom);
      bad = 0;
      if (v) begin
        case (c[7:4])
          4'h1: if (c[3:0] <= 4'd2) m.link = link_e'(c[1:0]); else bad = 1;
          4'h2: m.src_ddr3 = c[0];
          4'h3: m.route_ddr3 = c[0];
          4'h4: m.sel_shift = c[1:0];
          4'h5: m.tx_en = c[0];
          default: bad = 1;
        endcase
      end
      cmd_valid = v; cmd_byte = c;
      @(negedge clk);
      checks++;
      if (cfg !== m || bad_cmd !== bad) begin
        failures++;
        $display("t=%0d cmd %h: cfg %h exp %h bad %b exp %b", t, c, cfg, m, bad_cmd, bad);
      end
      if (bad) n_bad++;
    end
    checks++;
    if (n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
