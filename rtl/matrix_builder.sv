// Phase I of the Toeplitz extractor: sub-matrix seed selection.
//
// Step s (0 .. n/k-1) of a block multiplies raw bits d_{sk+1}..d_{sk+k} by
// columns sk+1..sk+k of the Toeplitz matrix. Those columns depend only on the
// m+k-1 seed bits t_{sk+1}..t_{sk+m+k-1}, so this stage picks that window out
// of the full seed with a step counter and registers it next to the k raw bits
// of the step. The step counter advances on every accepted raw word and wraps
// after n/k words; the first and last steps of a block are tagged.
//
// Interface: in_valid/in_raw carry one k-bit raw word per clock (no
// back-pressure: the source is a real-time stream). seed holds t_1..t_{m+n-1}
// (t_p in bit p-1) and must stay constant while a block is in flight.
// Timing: one register stage; out_* follow in_* by one clock.
// The window and the three-phase split follow the published scheme; the
// counter, the tags and the synchronous active-low reset are choices of this
// design.
module matrix_builder #(
  parameter int unsigned M = toeplitz_pkg::M_BITS,
  parameter int unsigned N = toeplitz_pkg::N_BITS,
  parameter int unsigned K = toeplitz_pkg::K_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [M+N-2:0]   seed,
  input  logic             in_valid,
  input  logic [K-1:0]     in_raw,
  output logic             out_valid,
  output logic             out_first,
  output logic             out_last,
  output logic [M+K-2:0]   out_window,
  output logic [K-1:0]     out_raw
);
  localparam int unsigned STEPS = N / K;
  localparam int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  initial begin
    assert (N % K == 0) else $fatal(1, "N must be a multiple of K");
  end

  logic [SW-1:0] step;
  logic          last_step;

  assign last_step = (step == SW'(STEPS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_first <= (step == '0);
        out_last  <= last_step;
        step      <= last_step ? '0 : step + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_window <= seed[step*K +: M+K-1];
      out_raw    <= in_raw;
    end
  end
endmodule
