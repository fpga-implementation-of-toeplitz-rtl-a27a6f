// Testbench of the dual-clock FIFO (16 words of 256 bits). Writer (period 10)
// and reader (period 14) run unrelated clocks and each side pauses at random,
// so the FIFO runs both full and empty. Every word read must be the next
// word written, full must be seen, and a write attempted while full must not
// be stored.
module tb_async_fifo;
  localparam int W = 256, AW = 4;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic wr_full, rd_empty;
  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;
  logic [W-1:0] model[$];
  int nread = 0;
  localparam int NWORDS = 600;

  async_fifo #(.W(W), .AW(AW)) dut (.*);
  always #5 wr_clk = ~wr_clk;
  always #7 rd_clk = ~rd_clk;

  initial begin
    #200000;
    failures++;
    $display("timeout: %0d read, %0d queued, full=%b empty=%b", nread, model.size(), wr_full, rd_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] x;
    for (int i = 0; i < W / 32; i++) x[i*32 +: 32] = $urandom;
    return x;
  endfunction

  // writer: in bursts, fast phase then slow phase
  initial begin
    int sent = 0;
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 0; rd_rst_n = 0;
    @(posedge wr_clk) wr_rst_n <= 1;
    @(posedge rd_clk) rd_rst_n <= 1;
    @(posedge wr_clk);
    while (sent < NWORDS) begin
      logic [W-1:0] x;
      bit go;
      go = (sent < 300) ? 1'b1 : ($urandom_range(0, 3) == 0);
      x = rnd();
      wr_en <= go; wr_data <= x;
      @(posedge wr_clk);
      #1;
      // the word counts if the FIFO was not full at the edge that took it
      if (go && !last_full) begin
        model.push_back(x);
        sent++;
      end
    end
    wr_en <= 0;
  end

  // wr_full as seen at each write-clock edge
  bit last_full;
  always @(negedge wr_clk) last_full = wr_full;
  always @(negedge wr_clk) if (wr_rst_n && wr_full) full_seen++;

  // reader: slow at first (FIFO fills), fast later (FIFO empties)
  initial begin
    @(posedge rd_rst_n);
    while (nread < NWORDS) begin
      bit go;
      @(negedge rd_clk);
      go = (nread < 200) ? ($urandom_range(0, 3) == 0) : 1'b1;
      if (rd_empty) empty_seen++;
      if (go && !rd_empty) begin
        checks++;
        if (model.size() == 0 || rd_data !== model[0]) begin
          failures++;
          $display("read %0d wrong", nread);
        end
        if (model.size() != 0) void'(model.pop_front());
        nread++;
        rd_en = 1;
      end else begin
        rd_en = 0;
      end
      @(posedge rd_clk);
      #1 rd_en = 0;
    end
    checks++;
    if (full_seen == 0 || empty_seen == 0) begin
      failures++;
      $display("full seen %0d, empty seen %0d", full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
