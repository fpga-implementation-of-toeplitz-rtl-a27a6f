// Workload testbench: statistics of extracted bits from a correlated source.
//
// The ADC is fed with 8-bit samples of a strongly correlated Gaussian process
// (first-order autoregressive, coefficient 0.7, standard deviation about 20
// codes around mid-scale), the kind of raw data whose sample distribution and
// autocorrelation the design is meant to clean up. The whole design runs at
// its default sizes, for the 10^7 extracted bits used in the published statistical
// evaluation, with streaming on the SFP link and a link that is always
// ready. After BLOCKS extracted words (1024 bits each) the testbench checks:
//   - the raw samples really are correlated (lag-1 coefficient above 0.5);
//   - the fraction of ones in the output is 0.5 within 5 standard errors;
//   - the output bit autocorrelation at lags 1..16 is within 5 standard
//     errors of zero;
//   - the output rate: BLOCKS results need BLOCKS * 19 extractor clocks
//     (within the pipeline fill), i.e. 3.37 Gbit/s at 62.5 MHz;
//   - nothing was dropped or overflowed.
module tb_workload_statistics;
  import trng_pkg::*;
  localparam int M = 1024, N = 1520, STEPS = 19;
  localparam int BLOCKS = 9766;    // 10,000,384 extracted bits

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
  logic [2:0] tx_valid, tx_ready = 3'b111, rx_valid = '0, rx_ready;
  logic [2:0][7:0] rx_data = '0;
  logic bad_cmd;
  cfg_t cfg_out;

  trng_postproc_top dut (.*);

  int checks = 0, failures = 0;

  always #4 clk_adc = ~clk_adc;
  always @(posedge clk_adc) clk_sys <= ~clk_sys;
  always #2.5 clk_ddr = ~clk_ddr;
  always #3.5 clk_tx = ~clk_tx;

  initial begin
    repeat (BLOCKS * STEPS * 3 + 5000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- correlated Gaussian ADC samples ----
  real y = 0.0;
  real s_sum = 0.0, s_sq = 0.0, s_lag = 0.0, s_prev = 0.0;
  longint n_samp = 0;

  function automatic real gauss();
    int acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(0, 1000));
    return real'(acc - 6000) / 1000.0;
  endfunction

  function automatic logic [7:0] next_sample();
    int v;
    y = 0.7 * y + 14.0 * gauss();
    v = 128 + int'($rtoi(y + ((y >= 0.0) ? 0.5 : -0.5)));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    s_sum += v;
    s_sq += real'(v) * real'(v);
    if (n_samp > 0) s_lag += real'(v) * s_prev;
    s_prev = v;
    n_samp++;
    return 8'(v);
  endfunction

  always @(clk_adc) begin
    logic [31:0] w;
    #1;
    for (int i = 0; i < 4; i++) w[i*8 +: 8] = next_sample();
    adc_ddr = w;
  end

  // ---- output collection ----
  bit out_bits[$];
  int n_words = 0, n_drop = 0, hash_n = 0, first_hash = -1, last_hash = -1, sys_cyc = 0;
  always @(negedge clk_tx) begin
    if (rst_tx_n && tx_valid[0] && tx_ready[0]) begin
      for (int b = 0; b < 32; b++) out_bits.push_back(tx_data[b]);
    end
  end
  always @(negedge clk_sys) begin
    sys_cyc++;
    if (rst_sys_n && ext_drop) n_drop++;
    if (rst_sys_n && dut.hash_valid) begin
      if (first_hash < 0) first_hash = sys_cyc;
      last_hash = sys_cyc;
      hash_n++;
    end
  end

  initial begin
    for (int p = 0; p < M + N - 1; p++) seed[p] = 1'($urandom);
    repeat (10) @(posedge clk_sys);
    #1;
    rst_adc_n = 1; rst_sys_n = 1; rst_ddr_n = 1; rst_tx_n = 1;
    while (out_bits.size() < BLOCKS * M) @(posedge clk_tx);
    begin
      real nb, ones, p1, se, mean, var_s, r1;
      real mu, sd, c;
      int nbits;
      nbits = BLOCKS * M;
      nb = real'(nbits);
      // raw sample correlation
      mean = s_sum / real'(n_samp);
      var_s = s_sq / real'(n_samp) - mean * mean;
      r1 = (s_lag / real'(n_samp - 1) - mean * mean) / var_s;
      checks++;
      if (r1 < 0.5) begin failures++; $display("raw samples not correlated: r1=%f", r1); end
      // output balance
      ones = 0.0;
      for (int i = 0; i < nbits; i++) ones += out_bits[i];
      p1 = ones / nb;
      se = 0.5 / $sqrt(nb);
      checks++;
      if (p1 - 0.5 > 5.0 * se || 0.5 - p1 > 5.0 * se) begin
        failures++; $display("output bias: fraction of ones %f", p1);
      end
      // output autocorrelation at lags 1..16
      mu = p1;
      sd = p1 * (1.0 - p1);
      for (int lag = 1; lag <= 16; lag++) begin
        c = 0.0;
        for (int i = 0; i + lag < nbits; i++)
          c += (real'(out_bits[i]) - mu) * (real'(out_bits[i + lag]) - mu);
        c = c / (real'(nbits - lag) * sd);
        checks++;
        if (c > 5.0 / $sqrt(nb) || c < -5.0 / $sqrt(nb)) begin
          failures++; $display("output autocorrelation at lag %0d: %f", lag, c);
        end
      end
      // rate: BLOCKS results spaced by 19 extractor clocks
      checks++;
      if (last_hash - first_hash > (hash_n - 1) * STEPS + 2 * STEPS) begin
        failures++;
        $display("%0d results took %0d clocks", hash_n, last_hash - first_hash);
      end
      checks++;
      if (n_drop != 0 || deser_overflow || ddr3_overflow) begin
        failures++; $display("drops %0d overflow %b %b", n_drop, deser_overflow, ddr3_overflow);
      end
      $display("raw samples: %0d, mean %f, sd %f, lag-1 correlation %f", n_samp, mean, $sqrt(var_s), r1);
      $display("output: %0d bits, fraction of ones %f, %0d results in %0d clocks (%0d Mbit/s at 62.5 MHz)",
               nbits, p1, hash_n, last_hash - first_hash,
               longint'(hash_n - 1) * M * 62500 / (longint'(last_hash - first_hash) * 1000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
