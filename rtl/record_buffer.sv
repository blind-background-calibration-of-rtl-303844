// Record buffer: captures one block of both ADC streams and replays it to the
// calibration engine for repeated LMS passes.
//
// The error sum pairs e[n] with d[K*n], so its value depends on the phase of
// the signal at n = 0. When live blocks are not an exact number of input
// periods, that phase changes from block to block and the estimates average
// towards zero. Estimating on one stored record keeps the phase fixed: the
// coefficients are estimated from the record, stored, and the converter then
// returns to normal operation with them.
//
// Operation: a `capture` pulse arms the buffer; the next N valid input
// samples are written (both streams side by side). After that `captured` is
// high. While `replay_en` is high and a record is held, the record is sent
// out once per clock from address 0 to N-1 and again, so every pass is one
// calibration block. Dropping replay_en stops the replay and rewinds it to
// address 0. A new capture discards the old record.
//
// Timing: q_full/q_half/out_valid are registered; the first replayed sample
// (address 0) appears one clock after replay_en is first seen high.
// Capturing a record and replaying it is this design's reading of how the
// coefficients are estimated and then stored; the published design gives no buffer.
module record_buffer
  import cal_pkg::*;
#(
  parameter int  N  = 12288,
  localparam int AW = $clog2(N)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  capture,
  input  logic  in_valid,
  input  word_t d_full,
  input  word_t d_half,
  input  logic  replay_en,
  output logic  captured,
  output logic  out_valid,
  output word_t q_full,
  output word_t q_half,
  output logic  replaying
);
  typedef enum logic [1:0] {EMPTY, FILL, HELD} state_t;

  state_t        state;
  logic [AW-1:0] wptr, rptr;
  word_t         mem_full [N];
  word_t         mem_half [N];

  assign captured  = (state == HELD);
  assign replaying = captured && replay_en;

  always_ff @(posedge clk)
    if (state == FILL && in_valid && !capture) begin
      mem_full[wptr] <= d_full;
      mem_half[wptr] <= d_half;
    end

  always_ff @(posedge clk) begin
    q_full <= mem_full[rptr];
    q_half <= mem_half[rptr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= EMPTY;
      wptr      <= '0;
      rptr      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (capture) begin
        state <= FILL;
        wptr  <= '0;
        rptr  <= '0;
      end else begin
        case (state)
          FILL: if (in_valid) begin
            wptr <= (wptr == AW'(N - 1)) ? '0 : wptr + 1'b1;
            if (wptr == AW'(N - 1)) state <= HELD;
          end
          HELD: if (replay_en) begin
            out_valid <= 1'b1;
            rptr      <= (rptr == AW'(N - 1)) ? '0 : rptr + 1'b1;
          end else begin
            rptr <= '0;
          end
          default: ;
        endcase
      end
    end
endmodule
