// Calibration block sequencer.
//
// The coefficient estimate is built from sums over blocks of N samples. While
// cal_en is high, every valid sample belongs to a block: the first of a block
// is flagged `first` (m = 0) and the N-th `last` (m = N-1), after which the
// next sample starts a new block. When cal_en falls the block in progress is
// abandoned (the correlators discard it at the next `first`), so the stored
// coefficients stay untouched: that is normal operation with the coefficients
// frozen. `blocks` counts completed blocks.
//
// Timing: first, last and blk_valid are combinational from in_valid and
// cal_en of the same clock. N is this design's choice; the published design does not
// give a block length.
module cal_controller #(
  parameter int N = 12288,
  localparam int MW = $clog2(N + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cal_en,
  input  logic        in_valid,
  output logic        blk_valid,
  output logic        first,
  output logic        last,
  output logic [31:0] blocks
);
  logic          active;   // a block is in progress
  logic [MW-1:0] m_q, m_cur;

  always_comb begin
    blk_valid = in_valid && cal_en;
    m_cur     = active ? m_q : '0;
    first     = blk_valid && !active;
    last      = blk_valid && (m_cur == MW'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0;
      m_q    <= '0;
      blocks <= '0;
    end else if (!cal_en) begin
      active <= 1'b0;
    end else if (in_valid) begin
      active <= !last;
      m_q    <= m_cur + 1'b1;
      if (last) blocks <= blocks + 1;
    end

  initial assert (N >= 2) else $error("cal_controller: N must be at least 2");
endmodule
