// Testbench of transmission control. A model FIFO offers random 256-bit
// words; the three link sinks accept beats at random. Each word must leave as
// eight 32-bit beats, lowest first, all on the link that was selected when the
// word was taken, while the selected link is switched between words. With
// streaming disabled no word may be taken. Command bytes offered on several
// links at once must all arrive, lowest link first, each exactly once.
module tb_tx_control;
  import trng_pkg::*;
  localparam int W = 256, TX_W = 32, L = 3;
  logic clk = 0, rst_n = 0;
  link_e cfg_link = LINK_SFP;
  logic cfg_tx_en = 1;
  logic fifo_empty = 1, fifo_rd;
  logic [W-1:0] fifo_data = '0;
  logic [TX_W-1:0] tx_data;
  logic [L-1:0] tx_valid, tx_ready = '0, rx_valid = '0, rx_ready;
  logic [L-1:0][7:0] rx_data = '0;
  logic cmd_valid;
  logic [7:0] cmd_byte;
  int checks = 0, failures = 0;
  logic [TX_W-1:0] beat_q[$];
  int link_q[$];
  int words_taken = 0, beats_seen = 0;
  int per_link[L] = '{0, 0, 0};
  logic [7:0] cmd_q[$];

  tx_control #(.W(W), .TX_W(TX_W), .LINKS(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model FIFO and link sinks. Stimulus changes 1 time unit after each rising
  // edge; handshakes are judged at the falling edge, on the values the next
  // rising edge will sample.
  bit pop = 0;
  always @(posedge clk) begin
    #1;
    if (pop) begin fifo_empty = 1; pop = 0; end
    if (rst_n && fifo_empty && $urandom_range(0, 1)) begin
      for (int i = 0; i < W / 32; i++) fifo_data[i*32 +: 32] = $urandom;
      fifo_empty = 0;
    end
    tx_ready = L'($urandom);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (fifo_rd) begin
        checks++;
        if (fifo_empty || !cfg_tx_en) begin failures++; $display("bad FIFO read"); end
        for (int b = 0; b < W / TX_W; b++) begin
          beat_q.push_back(fifo_data[b*TX_W +: TX_W]);
          link_q.push_back(int'(cfg_link));
        end
        words_taken++;
        pop = 1;
      end
      for (int l = 0; l < L; l++) begin
        if (tx_valid[l] && tx_ready[l]) begin
          checks++;
          if (beat_q.size() == 0 || tx_data !== beat_q[0] || link_q[0] != l) begin
            failures++; $display("beat %0d wrong (link %0d)", beats_seen, l);
          end
          if (beat_q.size() != 0) begin void'(beat_q.pop_front()); void'(link_q.pop_front()); end
          beats_seen++;
          per_link[l]++;
        end
      end
      if (cmd_valid) begin
        checks++;
        if (cmd_q.size() == 0 || cmd_byte !== cmd_q[0]) begin failures++; $display("command wrong"); end
        if (cmd_q.size() != 0) void'(cmd_q.pop_front());
      end
    end
  end

  task automatic send_cmds(input logic [L-1:0] which);
    logic [L-1:0][7:0] d;
    logic [L-1:0] pend;
    for (int l = 0; l < L; l++) d[l] = 8'($urandom);
    pend = which;
    @(negedge clk);
    rx_valid = pend; rx_data = d;
    while (pend != 0) begin
      @(posedge clk);
      #1;
      for (int l = 0; l < L; l++) if (pend[l] && rx_ready[l]) begin
        cmd_q.push_back(d[l]);
        pend[l] = 0;
        break;
      end
      rx_valid = pend;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int ph = 0; ph < 12; ph++) begin
      @(posedge clk);
      #2 cfg_link = link_e'(ph % 3);
      repeat (60) @(posedge clk);
    end
    // streaming off: nothing may be taken
    @(posedge clk);
    #2 cfg_tx_en = 0;
    repeat (30) @(posedge clk);
    begin
      int w0;
      w0 = words_taken;
      repeat (100) @(posedge clk);
      checks++;
      if (words_taken != w0) begin failures++; $display("word taken while disabled"); end
    end
    send_cmds(3'b111);
    send_cmds(3'b110);
    send_cmds(3'b101);
    repeat (5) @(posedge clk);
    checks++;
    if (cmd_q.size() != 0 || per_link[0] == 0 || per_link[1] == 0 || per_link[2] == 0 ||
        words_taken < 20) begin
      failures++;
      $display("cmds left %0d, beats per link %0d %0d %0d, words %0d", cmd_q.size(),
               per_link[0], per_link[1], per_link[2], words_taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
