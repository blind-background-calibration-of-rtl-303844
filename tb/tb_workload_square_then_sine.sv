// Workload testbench: coefficients estimated on an arbitrary signal, then
// used on a sine, with the converter at its default parameters.
//
// 450 MHz sampling is taken as one sample per clock. The estimation input is
// a rounded square wave, 0.8 * tanh(2.5 sin(2 pi t / 450)) / tanh(2.5), i.e.
// 1 MHz: one block is captured and replayed for 80 background passes. The
// coefficients are then frozen and a 1 MHz sine is converted at amplitudes
// 0.001, 0.01, 0.05, 0.2, 0.5 and 0.8 of full scale.
//
// For each amplitude the output is analysed over 9000 samples (20 input
// cycles) with single-bin DFTs: the 2nd and 3rd harmonics, and the SNDR over
// the signal band of an oversampling ratio of 64 (DFT bins 1 to 70, i.e. up
// to 3.5 MHz), before and after calibration.
// Checks: at 0.8 and 0.5 of full scale the 3rd harmonic falls by 10 dB and
// the SNDR rises by 6 dB and 3 dB (across VCO start states a single record
// gave 11 to 19 dB and 9 to 15 dB at 0.8); at 0.2, where distortion is
// below the noise, calibration must not lower the SNDR by more than 1 dB;
// below 0.1, where the squared quantization noise of the raw codes matters,
// by no more than 6 dB.
//
// Estimating on an arbitrary signal, then converting a 1 MHz tone at
// 450 MS/s and judging it over an OSR-64 band, follows the published
// measurement. The square wave's shape and rate, the amplitudes and the
// thresholds are this testbench's own.
module tb_workload_square_then_sine;
  import cal_pkg::*;
  localparam int  N    = 12288;
  localparam int  PER  = 450;
  localparam int  LEN  = 20 * PER;
  localparam int  BAND = LEN / 128;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, cal_en = 0, bg_mode = 1, capture = 0, rec_mode = 0;
  real  vin = 0.0;
  logic signed [7:0] mu2 = 8'sd24, mu3 = 8'sd64;
  word_t d_out, d_by2, d_cal, alpha2, alpha3;
  logic d_out_valid, d_cal_valid, blk_done, coef_sat, captured, replaying;
  logic [31:0] blocks;
  int checks = 0, failures = 0;
  longint t = 0;
  bit square = 0;
  real amp = 0.8;
  real y[LEN];

  blind_cal_adc_top dut (.clk, .rst_n, .vin, .cal_en, .bg_mode, .capture, .rec_mode,
                         .mu2, .mu3, .d_out, .d_by2, .d_out_valid, .d_cal, .d_cal_valid,
                         .alpha2, .alpha3, .blk_done, .blocks, .coef_sat, .captured,
                         .replaying);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real tanh_r(input real x);
    return ($exp(x) - $exp(-x)) / ($exp(x) + $exp(-x));
  endfunction

  task automatic step();
    real ph = 2.0 * PI * real'(t + 1) / real'(PER);
    vin = square ? 0.8 * tanh_r(2.5 * $sin(ph)) / tanh_r(2.5) : amp * $sin(ph);
    @(posedge clk); #1;
    t++;
  endtask

  function automatic real bin_pow(input int k);
    real c = 0, s = 0;
    for (int i = 0; i < LEN; i++) begin
      c += y[i] * $cos(2.0 * PI * real'(k * i) / real'(LEN));
      s += y[i] * $sin(2.0 * PI * real'(k * i) / real'(LEN));
    end
    return (c * c + s * s);
  endfunction

  // analyse LEN samples of d_cal: harmonic amplitudes and in-band SNDR (dB)
  task automatic analyse(output real h2, output real h3, output real sndr);
    real ps, pn;
    while (t % longint'(PER) != 0) step();
    for (int i = 0; i < LEN; i++) begin
      step();
      y[i] = real'(d_cal) / 16384.0;
    end
    ps = bin_pow(20);
    pn = 0;
    for (int k = 1; k <= BAND; k++) if (k != 20) pn += bin_pow(k);
    h2 = 2.0 * $sqrt(bin_pow(40)) / real'(LEN);
    h3 = 2.0 * $sqrt(bin_pow(60)) / real'(LEN);
    sndr = 10.0 * $log10(ps / pn);
  endtask

  initial begin
    automatic real amps[6] = '{0.001, 0.01, 0.05, 0.2, 0.5, 0.8};
    automatic real h2b[6], h3b[6], sb[6], h2, h3, s;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) step();
    // uncalibrated
    foreach (amps[i]) begin
      amp = amps[i];
      analyse(h2b[i], h3b[i], sb[i]);
    end
    // estimate on the rounded square wave
    square = 1;
    repeat (2 * PER) step();
    capture = 1; step(); capture = 0;
    while (!captured) step();
    rec_mode = 1; cal_en = 1;
    while (blocks < 80) step();
    rec_mode = 0; cal_en = 0;
    repeat (8) step();
    square = 0;
    $display("estimated on square wave: alpha2=%0d alpha3=%0d (%0d blocks)", alpha2, alpha3, blocks);
    // convert sines with the stored coefficients
    foreach (amps[i]) begin
      amp = amps[i];
      analyse(h2, h3, s);
      $display("amplitude %0.3f: HD2 %0.6f -> %0.6f  HD3 %0.6f -> %0.6f  SNDR %0.1f -> %0.1f dB",
               amps[i], h2b[i], h2, h3b[i], h3, sb[i], s);
      checks++;
      if (amps[i] > 0.3) begin
        automatic real hd_db = 10.0;
        automatic real sn_db = (amps[i] > 0.6) ? 6.0 : 3.0;
        checks++;
        if (!(h3 * $pow(10.0, hd_db / 20.0) < h3b[i])) begin
          failures++; $display("  HD3 not reduced by %0.0f dB", hd_db);
        end
        if (!(s > sb[i] + sn_db)) begin failures++; $display("  SNDR not raised by %0.0f dB", sn_db); end
      end else begin
        // below about -20 dBFS the squared quantization noise of the raw codes
        // (whose power depends on the input) costs a few dB; bound the loss
        automatic real loss_db = (amps[i] > 0.1) ? 1.0 : 6.0;
        if (s < sb[i] - loss_db) begin
          failures++; $display("  SNDR lowered by more than %0.0f dB", loss_db);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
