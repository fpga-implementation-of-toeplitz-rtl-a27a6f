// End-to-end testbench of the whole FPGA design at its default sizes
// (m = 1024, n = 1520, k = 80), with the top's parameters untouched.
//
// Clocks: ADC data clock 125 MHz (period 8 units); the 62.5 MHz extractor
// clock is derived from it by division as the board's PLL does; DDR3 user
// clock 200 MHz; host link clock about 143 MHz. The ADC bus gets a new random
// word 1 unit after each edge of its clock. The testbench plays the DDR3
// controller (reading the recording FIFO and serving readback words) and the
// three host links (random ready, command bytes).
//
// Reference: the raw words that enter data select (observed at the
// deserializer's input together with the selection offset in force) are
// selected and packed by the testbench itself; every 1520 raw bits are hashed
// with a direct m x n Toeplitz product, cut into 256-bit then 32-bit beats and
// compared, in order, with the beats leaving on the links. The input DDR
// capture is checked against the driven ADC words, the recorded DDR3 words
// against the routed ADC words, and the readback words against the link beats.
//
// Sequence: default settings; switch to the Ethernet link and a selection
// offset of 2; switch to the USB link and send an invalid command; route raw
// data to DDR3 and record; play back recorded words through the output path;
// return to extraction; stop streaming until extracted words are dropped.
// Each mechanism is counted and must have happened. The extractor's result
// spacing must be n/k = 19 clocks while raw data flows unbroken.
module tb_trng_postproc_top;
  import tb_ref_pkg::*;
  import trng_pkg::*;
  localparam int M = 1024, N = 1520, K = 80, STEPS = N / K;

  logic clk_adc = 0, clk_sys = 0, clk_ddr = 0, clk_tx = 0;
  logic rst_adc_n = 0, rst_sys_n = 0, rst_ddr_n = 0, rst_tx_n = 0;
  logic [31:0] adc_ddr = '0;
  logic deser_overflow, ddr3_overflow, ext_drop;
  logic [M+N-2:0] seed;
  logic ddr3_rd_valid = 0, ddr3_rd_ready;
  logic [255:0] ddr3_rd_data = '0;
  logic ddr3_wr_en = 0, ddr3_wr_empty;
  logic [255:0] ddr3_wr_data;
  logic [31:0] tx_data;
  logic [2:0] tx_valid, tx_ready = '0, rx_valid = '0, rx_ready;
  logic [2:0][7:0] rx_data = '0;
  logic bad_cmd;
  cfg_t cfg_out;

  trng_postproc_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  always #4 clk_adc = ~clk_adc;
  always @(posedge clk_adc) clk_sys <= ~clk_sys;
  always #2.5 clk_ddr = ~clk_ddr;
  always #3.5 clk_tx = ~clk_tx;

  initial begin
    repeat (100000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC and input capture ----------------
  logic [31:0] hist[$];
  int rises = 0;
  always @(clk_adc) begin
    #1 adc_ddr = $urandom;
    hist.push_back(adc_ddr);
  end
  // hist[2p] is sampled by falling edge p, hist[2p+1] by rising edge p+1, so
  // rising edge p presents {hist[2p-2], hist[2p-3]} (see the capture block).
  always @(negedge clk_adc) begin
    rises++;
    if (rises >= 4 && rises % 16 == 0) begin
      int p;
      p = rises - 1;
      checks++;
      if (dut.adc_word !== {hist[2*p-2], hist[2*p-3]}) begin
        failures++;
        $display("capture mismatch at edge %0d", p);
      end
    end
  end

  // ---------------- reference of the extraction path ----------------
  bit seed_b[];
  bit raw_q[$];
  int nref = 0;
  logic [31:0] exp_q[$];
  int n_shifted = 0;
  logic [63:0] rec_q[$];

  always @(negedge clk_adc) begin
    if (rst_adc_n && dut.u_deser.in_valid) begin
      logic [63:0] x;
      int sh;
      x = dut.u_deser.in_data;
      sh = int'(dut.u_deser.sel_shift);
      if (sh != 0) n_shifted++;
      for (int s = 0; s < 8; s++)
        for (int b = 0; b < 5; b++) raw_q.push_back(x[s*8 + sh + b]);
      while (raw_q.size() >= N) begin
        bit d[];
        bit r[];
        d = new[N];
        for (int j = 0; j < N; j++) d[j] = raw_q.pop_front();
        toeplitz_ref(seed_b, d, M, r);
        for (int w = 0; w < M / 32; w++) begin
          logic [31:0] v;
          for (int b = 0; b < 32; b++) v[b] = r[w*32 + b];
          exp_q.push_back(v);
        end
        nref++;
      end
    end
    if (rst_adc_n && dut.u_ddr3_wr.in_valid) rec_q.push_back(dut.u_ddr3_wr.in_data);
  end

  // ---------------- extractor rate ----------------
  int hash_n = 0, last_hash = -1, sys_cyc = 0, spacing_checked = 0;
  bit rate_window = 0;
  always @(negedge clk_sys) begin
    sys_cyc++;
    if (rst_sys_n && dut.hash_valid) begin
      if (rate_window && last_hash >= 0) begin
        checks++;
        spacing_checked++;
        if (sys_cyc - last_hash != STEPS) begin
          failures++;
          $display("extractor result spacing %0d", sys_cyc - last_hash);
        end
      end
      last_hash = sys_cyc;
      hash_n++;
    end
  end

  // ---------------- DDR3 controller model ----------------
  logic [255:0] stored[$];
  int n_rec = 0;
  always @(negedge clk_ddr) begin
    ddr3_wr_en = 0;
    if (rst_ddr_n && !ddr3_wr_empty) begin
      logic [255:0] e;
      for (int w = 0; w < 4; w++) e[w*64 +: 64] = rec_q[n_rec*4 + w];
      checks++;
      if (ddr3_wr_data !== e) begin failures++; $display("recorded word %0d wrong", n_rec); end
      stored.push_back(ddr3_wr_data);
      n_rec++;
      ddr3_wr_en = 1;
    end
  end

  int n_play = 0;
  task automatic play_back(input int count);
    for (int i = 0; i < count; i++) begin
      @(posedge clk_sys);
      #1 ddr3_rd_valid = 1;
      ddr3_rd_data = stored[i];
      forever begin
        @(negedge clk_sys);
        if (ddr3_rd_ready) break;
      end
      for (int w = 0; w < 8; w++) exp_q.push_back(stored[i][w*32 +: 32]);
      n_play++;
      @(posedge clk_sys);
      #1 ddr3_rd_valid = 0;
    end
  endtask

  // ---------------- host links ----------------
  bit checking = 1;
  int per_link[3] = '{0, 0, 0};
  int n_beats = 0, n_stall = 0, n_bad = 0, n_drop = 0;
  always @(posedge clk_tx) begin
    #1 for (int l = 0; l < 3; l++) tx_ready[l] = ($urandom_range(0, 9) != 0);
  end
  always @(negedge clk_tx) begin
    if (rst_tx_n) begin
      for (int l = 0; l < 3; l++) begin
        if (tx_valid[l] && !tx_ready[l]) n_stall++;
        if (tx_valid[l] && tx_ready[l]) begin
          per_link[l]++;
          n_beats++;
          if (checking) begin
            checks++;
            if (exp_q.size() == 0 || tx_data !== exp_q[0]) begin
              failures++;
              if (failures < 10) $display("link beat %0d wrong", n_beats);
            end
          end
          if (exp_q.size() != 0) void'(exp_q.pop_front());
        end
      end
      if (bad_cmd) n_bad++;
    end
  end
  always @(negedge clk_sys) if (rst_sys_n && ext_drop) n_drop++;

  task automatic command(input int link, input logic [7:0] c);
    @(posedge clk_tx);
    #1 rx_valid[link] = 1;
    rx_data[link] = c;
    forever begin
      @(posedge clk_tx);
      #1 if (rx_ready[link]) break;
    end
    rx_valid[link] = 0;
    repeat (4) @(posedge clk_sys);
  endtask

  task automatic wait_beats(input int target);
    while (n_beats < target) @(posedge clk_tx);
  endtask

  task automatic wait_drained();
    int idle;
    idle = 0;
    while (idle < 200) begin
      @(posedge clk_tx);
      if (exp_q.size() == 0) idle++; else idle = 0;
    end
  endtask

  // ---------------- sequence ----------------
  initial begin
    seed_b = new[M + N - 1];
    for (int p = 0; p < M + N - 1; p++) begin
      seed_b[p] = 1'($urandom);
      seed[p] = seed_b[p];
    end
    repeat (10) @(posedge clk_sys);
    #1;
    rst_adc_n = 1; rst_sys_n = 1; rst_ddr_n = 1; rst_tx_n = 1;

    // A: default settings (SFP link, offset 0); check the extractor rate
    rate_window = 1;
    wait_beats(3 * 32);
    rate_window = 0;
    // B: Ethernet link, offset 2 (commands from the SFP link)
    command(0, {OP_LINK, 4'd1});
    command(0, {OP_SHIFT, 4'd2});
    wait_beats(7 * 32);
    // C: USB link, and an invalid command from the USB link
    command(1, {OP_LINK, 4'd2});
    command(2, 8'hF0);
    wait_beats(10 * 32);
    // D: record raw data in DDR3
    command(2, {OP_ROUTE, 4'd1});
    repeat (400) @(posedge clk_sys);
    wait_drained();
    // E: play recorded words back through the output path
    command(2, {OP_SOURCE, 4'd1});
    play_back(12);
    wait_drained();
    // F: back to extraction on the SFP link
    command(2, {OP_SOURCE, 4'd0});
    command(2, {OP_ROUTE, 4'd0});
    command(2, {OP_LINK, 4'd0});
    wait_beats(n_beats + 4 * 32);
    // G: stop streaming until extracted words are dropped, then resume
    command(0, {OP_TX_EN, 4'd0});
    checking = 0;
    repeat (400) @(posedge clk_sys);
    command(0, {OP_TX_EN, 4'd1});
    begin
      int b0;
      b0 = n_beats;
      repeat (300) @(posedge clk_sys);
      checks++;
      if (n_beats == b0) begin failures++; $display("streaming did not resume"); end
    end

    // every mechanism must have happened
    checks++;
    if (nref < 12 || spacing_checked == 0) begin
      failures++; $display("extracted blocks %0d, spacing checks %0d", nref, spacing_checked);
    end
    checks++;
    if (per_link[0] == 0 || per_link[1] == 0 || per_link[2] == 0) begin
      failures++; $display("beats per link %0d %0d %0d", per_link[0], per_link[1], per_link[2]);
    end
    checks++;
    if (n_shifted == 0) begin failures++; $display("offset change never used"); end
    checks++;
    if (n_rec < 12) begin failures++; $display("recorded words %0d", n_rec); end
    checks++;
    if (n_play != 12) begin failures++; $display("played back %0d", n_play); end
    checks++;
    if (n_stall == 0) begin failures++; $display("link back-pressure never seen"); end
    checks++;
    if (n_bad != 1) begin failures++; $display("invalid commands flagged %0d", n_bad); end
    checks++;
    if (n_drop == 0) begin failures++; $display("no extracted word dropped"); end
    checks++;
    if (deser_overflow || ddr3_overflow) begin failures++; $display("input overflow"); end
    $display("blocks %0d, beats %0d (SFP %0d, Ethernet %0d, USB %0d), stalls %0d",
             nref, n_beats, per_link[0], per_link[1], per_link[2], n_stall);
    $display("shifted words %0d, recorded %0d, played back %0d, bad commands %0d, drops %0d",
             n_shifted, n_rec, n_play, n_bad, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
