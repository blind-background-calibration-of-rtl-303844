// Digital calibration backend: blind estimation and removal of 2nd and 3rd
// harmonic distortion from two ADC streams.
//
// Data path, one sample per clock:
//   * Both ADC streams (d_out from the ADC driven by Vin, d_by2 from the ADC
//     driven by about Vin/2) pass through a harmonic corrector with the same
//     coefficients alpha2 and alpha3. The corrected Vin stream is the
//     calibrated ADC output d_cal.
//   * Background mode (bg_mode = 1): the signal remover forms
//     d_nosig = dcal_full - 2 * dcal_half, which holds no signal, only the
//     distortion the coefficients have not yet removed. Foreground mode
//     (bg_mode = 0, needs a clean sinusoid at the input): the corrected Vin
//     stream itself is used.
//   * Two harmonic correlators multiply that stream with d_out downsampled by
//     2 and by 3 and sum over a block of N samples; the sums are the error
//     terms err2 and err3.
//   * At the end of each block both coefficients are updated at once,
//     alpha_k += mu_k * err_k, and take effect on the following samples.
// coef_sat is high while either coefficient's last update was clipped.
// With cal_en low no blocks run, the coefficients are held, and the output is
// still corrected with them.
//
// Timing: d_cal follows d_out by one clock. cal_en and bg_mode are taken
// with the sample that enters on the same clock. err_k is ready one clock after the
// last sample of a block reaches the correlators (two clocks after it
// entered), the coefficients one clock later; blk_done pulses then. The few
// samples already in the correctors at that moment still use the old
// coefficients.
// The structure follows the published architecture; the block length, the
// mode input and the step sizes' form are this design's choice.
// The error sums grow with N, so MU_SHIFT goes with it: at the default
// N = 12288 a shift of 14 with mu2 = 24, mu3 = 64 settles in 10 to 20 blocks.
// Lint may report rst_n as used both asynchronously and synchronously: the
// second use is only the 'disable iff' of the assertions, not a flip-flop.
module cal_engine
  import cal_pkg::*;
#(
  parameter int N        = 12288,
  parameter int FRAC_EXT = 12,
  parameter int MU_SHIFT = 14,
  localparam int ERR2_W  = 2 * W + $clog2((N - 1) / 2 + 2) + 1,
  localparam int ERR3_W  = 2 * W + $clog2((N - 1) / 3 + 2) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  word_t             d_out,
  input  word_t             d_by2,
  input  logic              cal_en,
  input  logic              bg_mode,
  input  logic signed [7:0] mu2,
  input  logic signed [7:0] mu3,
  output word_t             d_cal,
  output logic              d_cal_valid,
  output word_t             alpha2,
  output word_t             alpha3,
  output logic              blk_done,
  output logic [31:0]       blocks,
  output logic              coef_sat
);
  word_t dcal_half, d_nosig, e, d_out_q;
  logic  half_valid, blk_valid, first, last, cal_en_q, bg_mode_q;
  logic  sat2, sat3, errv2, errv3;
  logic signed [ERR2_W-1:0] err2;
  logic signed [ERR3_W-1:0] err3;

  harmonic_corrector u_corr_full (
    .clk, .rst_n, .in_valid, .din(d_out), .alpha2, .alpha3,
    .out_valid(d_cal_valid), .dcal(d_cal));

  harmonic_corrector u_corr_half (
    .clk, .rst_n, .in_valid, .din(d_by2), .alpha2, .alpha3,
    .out_valid(half_valid), .dcal(dcal_half));

  // raw Vin stream and the control inputs, aligned with the corrector
  // outputs, so that cal_en and bg_mode apply to the samples that enter
  // together with them
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_out_q   <= '0;
      cal_en_q  <= 1'b0;
      bg_mode_q <= 1'b0;
    end else begin
      if (in_valid) d_out_q <= d_out;
      cal_en_q  <= cal_en;
      bg_mode_q <= bg_mode;
    end

  signal_remover u_rm (.d_full(d_cal), .d_half(dcal_half), .d_nosig);

  always_comb e = bg_mode_q ? d_nosig : d_cal;

  cal_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .cal_en(cal_en_q), .in_valid(d_cal_valid),
    .blk_valid, .first, .last, .blocks);

  harmonic_correlator #(.K(2), .N(N)) u_xc2 (
    .clk, .rst_n, .valid(blk_valid), .first, .last, .e, .d(d_out_q),
    .err(err2), .err_valid(errv2));

  harmonic_correlator #(.K(3), .N(N)) u_xc3 (
    .clk, .rst_n, .valid(blk_valid), .first, .last, .e, .d(d_out_q),
    .err(err3), .err_valid(errv3));

  alpha_update #(.ERR_W(ERR2_W), .FRAC_EXT(FRAC_EXT), .MU_SHIFT(MU_SHIFT)) u_upd2 (
    .clk, .rst_n, .err_valid(errv2), .err(err2), .mu(mu2),
    .alpha(alpha2), .saturated(sat2));

  alpha_update #(.ERR_W(ERR3_W), .FRAC_EXT(FRAC_EXT), .MU_SHIFT(MU_SHIFT)) u_upd3 (
    .clk, .rst_n, .err_valid(errv3), .err(err3), .mu(mu3),
    .alpha(alpha3), .saturated(sat3));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) blk_done <= 1'b0;
    else        blk_done <= errv2;

  assign coef_sat = sat2 | sat3;

  // both correlators see the same block boundaries
  assert property (@(posedge clk) disable iff (!rst_n) errv2 == errv3);
  assert property (@(posedge clk) disable iff (!rst_n) d_cal_valid == half_valid);
endmodule
