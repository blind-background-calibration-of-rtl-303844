// Coefficient update (LMS) and coefficient store for one harmonic.
//
//   alpha[b+1] = alpha[b] + mu * err[b]       once per completed block b
//
// The coefficient is held with FRAC_EXT fraction bits beyond the 15-bit
// word, so that steps smaller than one word LSB still accumulate; the top
// 15 bits are the Q1.14 coefficient used by the correctors. The step is
// err * mu / 2^MU_SHIFT with mu a signed run-time value: the sign is needed
// because, depending on the phase relation of the signal, the correlation of
// the residual harmonic with the downsampled stream can be negative. The sum
// saturates; `saturated` reports whether the last update was clipped.
//
// Between updates, and whenever calibration is off, the coefficient simply
// stays in its register: this is the stored coefficient that keeps
// correcting the output in normal operation. Reset clears it to zero.
// Timing: alpha changes the clock after err_valid.
// The update rule follows the published design; mu's scaling and sign, the extra
// fraction bits, saturation and reset value are this design's choice.
module alpha_update
  import cal_pkg::*;
#(
  parameter int ERR_W    = 43,
  parameter int FRAC_EXT = 12,
  parameter int MU_SHIFT = 12,
  localparam int AW      = W + FRAC_EXT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    err_valid,
  input  logic signed [ERR_W-1:0] err,
  input  logic signed [7:0]       mu,
  output word_t                   alpha,
  output logic                    saturated
);
  localparam int SW = ERR_W + 8 + 1;

  logic signed [AW-1:0] acc;
  logic signed [SW-1:0] step, sum;

  localparam logic signed [SW-1:0] ACC_MAX = SW'({1'b0, {(AW-1){1'b1}}});
  localparam logic signed [SW-1:0] ACC_MIN = -ACC_MAX - 1;

  always_comb begin
    step = (SW'(err) * SW'(mu)) >>> MU_SHIFT;
    sum  = SW'(acc) + step;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc       <= '0;
      saturated <= 1'b0;
    end else if (err_valid) begin
      saturated <= (sum > ACC_MAX) || (sum < ACC_MIN);
      if      (sum > ACC_MAX) acc <= AW'(ACC_MAX);
      else if (sum < ACC_MIN) acc <= AW'(ACC_MIN);
      else                    acc <= AW'(sum);
    end

  assign alpha = word_t'(acc >>> FRAC_EXT);
endmodule
