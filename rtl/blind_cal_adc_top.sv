// Complete harmonic-distortion-calibrated ADC.
//
// Analog front end: the input drives one VCO-based first-order delta-sigma
// ADC directly and a second identical one through an attenuator of gain about
// 0.5. Digital backend: the calibration engine corrects both streams with
// shared 2nd/3rd-order coefficients, removes the signal by subtracting twice
// the half-scale stream, correlates the remainder with the Vin stream
// downsampled by 2 and by 3, and updates the coefficients block by block. The
// calibrated output d_cal is the corrected Vin stream.
//
// Ports: clk is the sampling clock; vin the analog input (real, nominally
// -1..1); cal_en runs the estimation (low: coefficients frozen, output still
// corrected); bg_mode selects background (1) or foreground (0, clean sine
// input) estimation; mu2/mu3 are the signed step sizes. d_out and d_by2 are
// the raw ADC words, exposed for observation.
// Timing: d_out is valid three clocks after reset; d_cal one clock after the
// d_out it belongs to.
// VCO_K2/VCO_K3 give the front-end models their distortion; they describe the
// analog part and have no counterpart in the digital logic.
// Lint may report rst_n as used both asynchronously and synchronously: the
// second use is only the 'disable iff' of the assertions, not a flip-flop.
module blind_cal_adc_top
  import cal_pkg::*;
#(
  parameter int  N         = 12288,
  parameter int  FRAC_EXT  = 12,
  parameter int  MU_SHIFT  = 14,
  parameter real ATT_GAIN  = 0.5,
  parameter real VCO_F0    = 15.0,
  parameter real VCO_KV    = 10.0,
  parameter real VCO_K2    = 0.04,
  parameter real VCO_K3    = -0.08
) (
  input  logic              clk,
  input  logic              rst_n,
  input  real               vin,
  input  logic              cal_en,
  input  logic              bg_mode,
  input  logic              capture,
  input  logic              rec_mode,
  input  logic signed [7:0] mu2,
  input  logic signed [7:0] mu3,
  output word_t             d_out,
  output word_t             d_by2,
  output logic              d_out_valid,
  output word_t             d_cal,
  output logic              d_cal_valid,
  output word_t             alpha2,
  output word_t             alpha3,
  output logic              blk_done,
  output logic [31:0]       blocks,
  output logic              coef_sat,
  output logic              captured,
  output logic              replaying
);
  real   vin_half;
  logic  by2_valid, live_valid, rb_valid, eng_valid, eng_cal_en;
  word_t rb_full, rb_half, eng_full, eng_half;

  input_attenuator #(.GAIN(ATT_GAIN)) u_att (.vin, .vout(vin_half));

  vco_dsm_adc #(.F0_STEPS(VCO_F0), .KV_STEPS(VCO_KV), .K2(VCO_K2), .K3(VCO_K3))
    u_adc_full (.clk, .rst_n, .vin, .dout(d_out), .dout_valid(d_out_valid));

  vco_dsm_adc #(.F0_STEPS(VCO_F0), .KV_STEPS(VCO_KV), .K2(VCO_K2), .K3(VCO_K3))
    u_adc_half (.clk, .rst_n, .vin(vin_half), .dout(d_by2), .dout_valid(by2_valid));

  assign live_valid = d_out_valid && by2_valid;

  record_buffer #(.N(N)) u_rec (
    .clk, .rst_n, .capture, .in_valid(live_valid), .d_full(d_out), .d_half(d_by2),
    .replay_en(rec_mode && cal_en), .captured, .out_valid(rb_valid),
    .q_full(rb_full), .q_half(rb_half), .replaying);

  // engine input: the live streams, or the stored record in record mode
  always_comb begin
    eng_valid  = rec_mode ? rb_valid : live_valid;
    eng_full   = rec_mode ? rb_full  : d_out;
    eng_half   = rec_mode ? rb_half  : d_by2;
    eng_cal_en = rec_mode ? rb_valid : cal_en;
  end

  cal_engine #(.N(N), .FRAC_EXT(FRAC_EXT), .MU_SHIFT(MU_SHIFT)) u_engine (
    .clk, .rst_n, .in_valid(eng_valid), .d_out(eng_full), .d_by2(eng_half),
    .cal_en(eng_cal_en), .bg_mode, .mu2, .mu3, .d_cal, .d_cal_valid, .alpha2, .alpha3,
    .blk_done, .blocks, .coef_sat);
endmodule
