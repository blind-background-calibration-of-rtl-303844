// Harmonic correlator: selective sampling, multiplication and summation that
// produce the error term of one harmonic coefficient.
//
// Over a block of N samples (index m = 0..N-1) it forms
//
//   err = sum_{n=0}^{DEPTH-1} e[n] * d[K*n],     DEPTH = (N-1)/K + 1
//
// d is the raw ADC output; taking only every K-th sample of it (d[K*n])
// stretches its spectrum K times, so its fundamental lands on the K-th
// harmonic. e is the error stream (the signal-free stream in background mode,
// the corrected output in foreground mode). Sinusoids of different frequency
// average to zero, so err keeps only what e and the downsampled d share: the
// residual K-th harmonic.
//
// Index K*n runs ahead of n, so the block is summed as it streams: e[m] is
// written to a buffer for m < DEPTH, and on every K-th sample (m = K*n) the
// current d[m] is multiplied with the stored e[n] (n = m/K <= m, so it is
// already there). At m = 0 the read address equals the write address and the
// incoming e is used directly (bypass). Counters track m mod K and m/K; no
// divider is needed.
//
// Interface: valid/first/last mark the samples of a block (first with m = 0,
// last with m = N-1); a new first restarts the sum, which drops an unfinished
// block. err and a one-clock err_valid appear the clock after last.
// The block-wise sum is this design's way to bound the index; the published design
// gives the sum of products only.
// Lint may report rst_n as used both asynchronously and synchronously: the
// second use is only the 'disable iff' of the assertions, not a flip-flop.
module harmonic_correlator
  import cal_pkg::*;
#(
  parameter int K = 3,
  parameter int N = 12288,
  localparam int DEPTH = (N - 1) / K + 1,
  localparam int AW    = $clog2(DEPTH + 1),
  localparam int IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int MW    = $clog2(N + 1),
  localparam int ACC_W = 2 * W + AW + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic                    first,
  input  logic                    last,
  input  word_t                   e,
  input  word_t                   d,
  output logic signed [ACC_W-1:0] err,
  output logic                    err_valid
);
  word_t buffer [DEPTH];

  logic [MW-1:0]          m_q, m_cur;      // sample index
  logic [$clog2(K+1)-1:0] ph_q, ph_cur;    // m mod K
  logic [AW-1:0]          n_q, n_cur;      // m / K
  logic signed [ACC_W-1:0] acc_q, acc_base, acc_nxt;
  word_t                  e_sel;
  logic                   bypass;

  always_comb begin
    m_cur    = first ? '0 : m_q;
    ph_cur   = first ? '0 : ph_q;
    n_cur    = first ? '0 : n_q;
    acc_base = first ? '0 : acc_q;
    bypass   = (MW'(n_cur) == m_cur);
    e_sel    = bypass ? e : buffer[IW'(n_cur)];
    acc_nxt  = acc_base;
    if (ph_cur == '0) acc_nxt = acc_base + ACC_W'(e_sel) * ACC_W'(d);
  end

  always_ff @(posedge clk)
    if (valid && m_cur < MW'(DEPTH)) buffer[IW'(m_cur)] <= e;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      m_q       <= '0;
      ph_q      <= '0;
      n_q       <= '0;
      acc_q     <= '0;
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= 1'b0;
      if (valid) begin
        m_q   <= m_cur + 1'b1;
        ph_q  <= (ph_cur == ($clog2(K+1))'(K - 1)) ? '0 : ph_cur + 1'b1;
        n_q   <= (ph_cur == '0) ? n_cur + 1'b1 : n_cur;
        acc_q <= acc_nxt;
        if (last) begin
          err       <= acc_nxt;
          err_valid <= 1'b1;
        end
      end
    end

  // The block sequencer must mark m = N-1 as last.
  assert property (@(posedge clk) disable iff (!rst_n)
                   valid && last |-> m_cur == MW'(N - 1));
endmodule
