// Testbench for the calibration engine (N = 1536).
//
// The two ADC streams are synthesised here from a cosine of 6 cycles per 1536
// samples, an exact number of cycles over every sum the correlators form, so
// the sinusoids are exactly orthogonal. Each stream is x + a2*x^2 + a3*x^3 of
// its own input (x and 0.49*x: the half-scale path has a gain error).
//
// Checks:
//  * every corrected output word equals a reference correction computed here
//    with the coefficients in effect for that sample;
//  * after every block both coefficients equal a reference LMS update built
//    from reference error sums over the block;
//  * background mode: the 2nd and 3rd harmonics of the output, measured by
//    single-bin DFTs over one block, fall by at least 15 dB and 25 dB (the
//    background equilibrium is pulled by the 4th-order residual that a
//    2nd/3rd-order correction leaves, which weighs differently in the
//    signal-free stream);
//  * with calibration off the coefficients stay put and the output is still
//    corrected;
//  * foreground mode (from reset, clean input) removes both by 40 dB.
//
// Timing: one sample per clock; the coefficients are compared after every
// blk_done pulse. The engine structure follows the published design; the
// block length, step sizes and thresholds are this design's own.
module tb_cal_engine;
  import cal_pkg::*;
  localparam int    N    = 1536;
  localparam int    J    = 6;
  localparam real   A    = 0.6;
  localparam real   A2   = 0.04;
  localparam real   A3   = -0.08;
  localparam real   G    = 0.50;
  localparam real   PI   = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, cal_en = 0, bg_mode = 1;
  word_t d_out = 0, d_by2 = 0, d_cal, alpha2, alpha3;
  logic signed [7:0] mu2 = 8'sd24, mu3 = 8'sd64;
  logic d_cal_valid, blk_done, coef_sat;
  logic [31:0] blocks;
  int checks = 0, failures = 0;

  cal_engine #(.N(N), .MU_SHIFT(12)) dut (.clk, .rst_n, .in_valid, .d_out, .d_by2, .cal_en, .bg_mode,
                           .mu2, .mu3, .d_cal, .d_cal_valid, .alpha2, .alpha3,
                           .blk_done, .blocks, .coef_sat);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference arithmetic ----------------
  function automatic longint fdiv(input longint a, input int sh);
    longint q = 64'sd1 <<< sh;
    if (a >= 0) return a / q;
    return -((-a + q - 1) / q);
  endfunction
  function automatic longint clip(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic longint corr(input longint d, input longint a2, input longint a3);
    longint s, c;
    s = fdiv(d * d, 14);
    c = fdiv(s * d, 14);
    return clip(d - fdiv(a2 * s, 14) - fdiv(a3 * c, 14), -16384, 16383);
  endfunction
  function automatic int adc(input real v);
    real y = v + A2 * v * v + A3 * v * v * v;
    return int'(y * 16384.0);
  endfunction

  // ---------------- reference model state ----------------
  longint e_blk[N], d_blk[N];
  longint acc2, acc3;           // reference coefficient registers (27 bits)
  int     m;                    // index in the current block
  longint exp_dcal;
  bit     exp_valid;
  int     updates;
  real    cos_acc2, sin_acc2, cos_acc3, sin_acc3;
  int     dft_n;

  // apply one input sample to the reference (coefficients as the DUT sees them)
  task automatic ref_sample(input longint din1, input longint din2);
    longint c1, c2, e, a2, a3, err2, err3, s;
    a2 = longint'(alpha2); a3 = longint'(alpha3);
    c1 = corr(din1, a2, a3);
    c2 = corr(din2, a2, a3);
    e  = bg_mode ? clip(c1 - 2 * c2, -16384, 16383) : c1;
    exp_dcal = c1;
    if (cal_en) begin
      e_blk[m] = e; d_blk[m] = din1;
      if (m == N - 1) begin
        err2 = 0; err3 = 0;
        for (int n = 0; 2 * n < N; n++) err2 += e_blk[n] * d_blk[2 * n];
        for (int n = 0; 3 * n < N; n++) err3 += e_blk[n] * d_blk[3 * n];
        s = acc2 + fdiv(err2 * longint'(mu2), 12);
        acc2 = clip(s, -(64'sd1 <<< 26), (64'sd1 <<< 26) - 1);
        s = acc3 + fdiv(err3 * longint'(mu3), 12);
        acc3 = clip(s, -(64'sd1 <<< 26), (64'sd1 <<< 26) - 1);
        m = 0;
      end else m++;
    end else m = 0;
  endtask

  // harmonic amplitude of d_cal at bin k*J, accumulated over one block
  task automatic dft_add(input int i, input longint y);
    real ph2 = 2.0 * PI * real'(2 * J * i) / real'(N);
    real ph3 = 2.0 * PI * real'(3 * J * i) / real'(N);
    cos_acc2 += real'(y) * $cos(ph2); sin_acc2 += real'(y) * $sin(ph2);
    cos_acc3 += real'(y) * $cos(ph3); sin_acc3 += real'(y) * $sin(ph3);
    dft_n++;
  endtask

  // run `count` samples; returns the HD2 and HD3 amplitudes of the last block
  task automatic run(input int count, input bit clean, output real h2, output real h3);
    real x;
    int  i0;
    for (int i = 0; i < count; i++) begin
      x = A * $cos(2.0 * PI * real'(J * i) / real'(N));
      d_out = word_t'(adc(x));
      d_by2 = clean ? word_t'(0) : word_t'(adc(G * x));
      in_valid = 1;
      ref_sample(longint'(d_out), longint'(d_by2));
      if (i == count - N) begin
        cos_acc2 = 0; sin_acc2 = 0; cos_acc3 = 0; sin_acc3 = 0; dft_n = 0; i0 = i;
      end
      @(posedge clk); #1;
      checks++;
      if (!d_cal_valid || longint'(d_cal) != exp_dcal) begin
        failures++;
        if (failures < 10) $display("sample %0d: d_cal=%0d expected %0d", i, d_cal, exp_dcal);
      end
      if (i >= count - N) dft_add(i - i0, longint'(d_cal));
      if (blk_done) begin
        updates++;
        checks++;
        if (longint'(alpha2) != fdiv(acc2, 12) || longint'(alpha3) != fdiv(acc3, 12)) begin
          failures++;
          $display("block %0d: alpha2=%0d/%0d alpha3=%0d/%0d", blocks, alpha2, fdiv(acc2, 12),
                   alpha3, fdiv(acc3, 12));
        end
      end
    end
    h2 = 2.0 * $sqrt(cos_acc2 * cos_acc2 + sin_acc2 * sin_acc2) / real'(N) / 16384.0;
    h3 = 2.0 * $sqrt(cos_acc3 * cos_acc3 + sin_acc3 * sin_acc3) / real'(N) / 16384.0;
  endtask

  task automatic do_reset();
    in_valid = 0; rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    acc2 = 0; acc3 = 0; m = 0;
  endtask

  task automatic expect_drop(input string what, input real h_before, input real h_after,
                            input real min_db);
    checks++;
    $display("%s: %0.6f -> %0.6f (%0.1f dB)", what, h_before, h_after,
             20.0 * $log10(h_before / (h_after + 1e-12)));
    if (!(h_after * $pow(10.0, min_db / 20.0) < h_before)) begin
      failures++; $display("  not reduced by %0.0f dB", min_db);
    end
  endtask

  initial begin
    real h2a, h3a, h2b, h3b, h2c, h3c;
    word_t a2_hold, a3_hold;
    int upd_before;
    updates = 0;
    // background calibration
    do_reset();
    bg_mode = 1; cal_en = 0;
    run(N, 0, h2a, h3a);                 // uncalibrated reference spectrum
    cal_en = 1;
    run(120 * N, 0, h2b, h3b);
    $display("background: alpha2=%0d alpha3=%0d (true %0d %0d)", alpha2, alpha3,
             int'(A2 * 16384.0), int'(A3 * 16384.0));
    expect_drop("bg HD2", h2a, h2b, 15.0);
    expect_drop("bg HD3", h3a, h3b, 25.0);
    // coefficients frozen: normal operation
    cal_en = 0;
    run(8, 0, h2c, h3c);                 // the update of the last block lands
    checks++;
    if (blocks != 120) begin failures++; $display("blocks=%0d", blocks); end
    a2_hold = alpha2; a3_hold = alpha3; upd_before = updates;
    run(3 * N, 0, h2c, h3c);
    checks += 2;
    if (alpha2 != a2_hold || alpha3 != a3_hold || updates != upd_before) begin
      failures++; $display("coefficients moved while frozen");
    end
    if (!(h3c * 10.0 < h3a)) begin failures++; $display("frozen output not corrected"); end
    // foreground calibration from reset, clean sine, half path unused
    do_reset();
    bg_mode = 0; cal_en = 1;
    run(150 * N, 1, h2b, h3b);
    $display("foreground: alpha2=%0d alpha3=%0d", alpha2, alpha3);
    expect_drop("fg HD2", h2a, h2b, 40.0);
    expect_drop("fg HD3", h3a, h3b, 40.0);
    checks++;
    if (updates < 200) begin failures++; $display("only %0d updates", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
