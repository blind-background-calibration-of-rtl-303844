// End-to-end testbench of the calibrated ADC, all parameters at their
// defaults (block length 12288, VCO distortion K2 = 0.04, K3 = -0.08).
//
// Part 1, live blocks: the input is a cosine of 12 cycles per block, so every
// block starts at the same signal phase. One block uncalibrated, 60 blocks of
// background calibration, a block abandoned by dropping cal_en halfway, two
// blocks with the coefficients frozen, then 40 blocks of foreground
// calibration (the input is a clean sine, which that mode needs).
// Part 2, record mode: after a reset the input is a tone of 1/450 cycles per
// sample (1 MHz at 450 MHz sampling), not a whole number of cycles per block.
// One block is captured and replayed for 60 background passes; then the
// converter runs live with the stored coefficients.
//
// Checks:
//  * every ADC word equals the step count of a ring phase tracked here from
//    the same tuning curve, two clocks late, centred and scaled;
//  * every calibrated word equals a reference correction with the
//    coefficients in effect for it, on live or replayed samples;
//  * after every block both coefficients equal a reference LMS update;
//  * the 3rd harmonic of the output falls by at least 20 dB after background
//    calibration and the 2nd by at least 10 dB (the quantization noise of
//    the 5-bit delta-sigma output also lands in those bins), in both parts;
//  * while frozen the coefficients stay put and the output stays corrected.
// Mechanisms counted (each must occur): background blocks, foreground
// blocks, an abandoned block, frozen samples that are still corrected, the
// correlator buffer bypass at m = 0, the mode switch, a record captured and
// replayed blocks.
//
// Timing: one sample per 10 ns clock, the ADC words two clocks after the
// edge that samples the ring, d_cal one clock later. The architecture under
// test follows the published design; the modes, the record buffer and the
// thresholds are this design's own.
module tb_blind_cal_adc_top;
  import cal_pkg::*;
  localparam int  N   = 12288;
  localparam real AV  = 0.8;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, cal_en = 0, bg_mode = 1, capture = 0, rec_mode = 0;
  real  vin = 0.0;
  logic signed [7:0] mu2 = 8'sd24, mu3 = 8'sd64;
  word_t d_out, d_by2, d_cal, alpha2, alpha3;
  logic d_out_valid, d_cal_valid, blk_done, coef_sat, captured, replaying;
  logic [31:0] blocks;
  int checks = 0, failures = 0;

  blind_cal_adc_top dut (.clk, .rst_n, .vin, .cal_en, .bg_mode, .capture, .rec_mode,
                         .mu2, .mu3, .d_out, .d_by2, .d_out_valid, .d_cal, .d_cal_valid,
                         .alpha2, .alpha3, .blk_done, .blocks, .coef_sat, .captured,
                         .replaying);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
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
  // ring steps per sample of the front-end VCOs (default tuning curve)
  function automatic real rate(input real v);
    real r = 15.0 + 10.0 * (v + 0.04 * v * v + -0.08 * v * v * v);
    if (r < 0.0) r = 0.0;
    if (r > 30.0 - 1.001) r = 30.0 - 1.001;
    return r;
  endfunction

  // ---------------- state ----------------
  real    fin;                            // input frequency, cycles per sample
  real    p_full, p_half;                 // tracked ring phases
  int     fl_full[$], fl_half[$];         // floor of the phase after each edge
  int     edge_no;
  longint e_blk[N], d_blk[N];
  longint acc2, acc3, exp_dcal;
  int     m;
  bit     exp_pending;
  // mirror of the record buffer
  longint rec_full[N], rec_half[N];
  bit     fill, held, rb_v;
  int     wcnt, ridx, rb_cur;
  int     n_bg = 0, n_fg = 0, n_abandon = 0, n_frozen_corr = 0, n_bypass = 0, n_switch = 0;
  int     n_capture = 0, n_replay_blocks = 0;

  always @(posedge clk)
    if (rst_n && dut.u_engine.u_xc3.valid && dut.u_engine.u_xc3.bypass) n_bypass++;

  task automatic ref_sample(input longint din1, input longint din2, input bit en);
    longint c1, c2r, e, err2, err3;
    c1  = corr(din1, longint'(alpha2), longint'(alpha3));
    c2r = corr(din2, longint'(alpha2), longint'(alpha3));
    e   = bg_mode ? clip(c1 - 2 * c2r, -16384, 16383) : c1;
    exp_dcal = c1;
    if (en) begin
      e_blk[m] = e; d_blk[m] = din1;
      if (m == N - 1) begin
        err2 = 0; err3 = 0;
        for (int n = 0; 2 * n < N; n++) err2 += e_blk[n] * d_blk[2 * n];
        for (int n = 0; 3 * n < N; n++) err3 += e_blk[n] * d_blk[3 * n];
        acc2 = clip(acc2 + fdiv(err2 * longint'(mu2), 14), -(64'sd1 <<< 26), (64'sd1 <<< 26) - 1);
        acc3 = clip(acc3 + fdiv(err3 * longint'(mu3), 14), -(64'sd1 <<< 26), (64'sd1 <<< 26) - 1);
        m = 0;
      end else m++;
    end else begin
      if (m != 0) n_abandon++;
      m = 0;
    end
  endtask

  // word after the latest edge: steps between the phases three and two edges back
  function automatic int expect_word(input int fl[$]);
    int c = (fl[fl.size() - 3] - fl[fl.size() - 4] + 30) % 30;
    return (c - 15) * 1024;
  endfunction

  // one clock: apply the next input, check everything the edge produced
  task automatic step();
    real v;
    v = AV * $cos(2.0 * PI * fin * real'(edge_no + 1));
    vin = v;
    // the sample that enters the engine on this edge
    exp_pending = 0;
    if (rec_mode) begin
      if (rb_v) begin
        ref_sample(rec_full[rb_cur], rec_half[rb_cur], 1'b1);
        exp_pending = 1;
      end else if (m != 0) begin
        n_abandon++; m = 0;
      end
    end else if (d_out_valid) begin
      ref_sample(longint'(d_out), longint'(d_by2), cal_en);
      exp_pending = 1;
    end
    // the record buffer on this edge
    rb_v = 0;
    if (capture) begin
      fill = 1; held = 0; wcnt = 0; ridx = 0;
    end else if (fill) begin
      if (d_out_valid) begin
        rec_full[wcnt] = longint'(d_out); rec_half[wcnt] = longint'(d_by2);
        wcnt++;
        if (wcnt == N) begin fill = 0; held = 1; end
      end
    end else if (held) begin
      if (rec_mode && cal_en) begin
        rb_v = 1; rb_cur = ridx; ridx = (ridx + 1) % N;
      end else ridx = 0;
    end
    p_full = p_full + rate(v);       if (p_full >= 30.0) p_full = p_full - 30.0;
    p_half = p_half + rate(v * 0.5); if (p_half >= 30.0) p_half = p_half - 30.0;
    @(posedge clk); #1;
    edge_no++;
    fl_full.push_back($rtoi(p_full));
    fl_half.push_back($rtoi(p_half));
    if (edge_no >= 3) begin
      checks += 2;
      if (!d_out_valid || int'(d_out) != expect_word(fl_full) ||
          int'(d_by2) != expect_word(fl_half)) begin
        failures++;
        if (failures < 10) $display("edge %0d: d_out=%0d/%0d d_by2=%0d/%0d", edge_no, d_out,
                                    expect_word(fl_full), d_by2, expect_word(fl_half));
      end
    end
    checks++;
    if (captured != held || replaying != (held && rec_mode && cal_en)) begin
      failures++; $display("edge %0d: record buffer flags", edge_no);
    end
    if (exp_pending) begin
      checks++;
      if (!d_cal_valid || longint'(d_cal) != exp_dcal) begin
        failures++;
        if (failures < 10) $display("edge %0d: d_cal=%0d expected %0d", edge_no, d_cal, exp_dcal);
      end
      if (!cal_en && !rec_mode && d_cal != d_out && (alpha2 != 0 || alpha3 != 0)) n_frozen_corr++;
    end
    if (blk_done) begin
      checks++;
      if (rec_mode) n_replay_blocks++;
      else if (bg_mode) n_bg++;
      else n_fg++;
      if (longint'(alpha2) != fdiv(acc2, 12) || longint'(alpha3) != fdiv(acc3, 12)) begin
        failures++;
        $display("block %0d: alpha2=%0d/%0d alpha3=%0d/%0d", blocks, alpha2, fdiv(acc2, 12),
                 alpha3, fdiv(acc3, 12));
      end
    end
    if (fl_full.size() > 8) begin void'(fl_full.pop_front()); void'(fl_half.pop_front()); end
  endtask

  // run until the word about to enter came from input phase 0 (period of
  // `per` samples)
  task automatic align(input int per);
    while ((edge_no - 2) % per != 0) step();
  endtask

  // harmonic amplitudes of the live d_cal over `len` samples holding `cyc`
  // input cycles
  task automatic measure(input int len, input int cyc, output real h2, output real h3);
    real ph, c2, s2, c3, s3;
    c2 = 0; s2 = 0; c3 = 0; s3 = 0;
    for (int i = 0; i < len; i++) begin
      step();
      ph = 2.0 * PI * real'(cyc * i) / real'(len);
      c2 += real'(d_cal) * $cos(2.0 * ph); s2 += real'(d_cal) * $sin(2.0 * ph);
      c3 += real'(d_cal) * $cos(3.0 * ph); s3 += real'(d_cal) * $sin(3.0 * ph);
    end
    h2 = 2.0 * $sqrt(c2 * c2 + s2 * s2) / real'(len) / 16384.0;
    h3 = 2.0 * $sqrt(c3 * c3 + s3 * s3) / real'(len) / 16384.0;
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

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  task automatic do_reset();
    rst_n = 0; cal_en = 0; rec_mode = 0; capture = 0;
    @(posedge clk); #1;
    p_full = 0.0; p_half = 0.0; edge_no = 0;
    fl_full.delete(); fl_half.delete();
    fl_full.push_back(0); fl_half.push_back(0);   // phase before the first edge
    acc2 = 0; acc3 = 0; m = 0;
    fill = 0; held = 0; rb_v = 0; wcnt = 0; ridx = 0;
    @(posedge clk); #1 rst_n = 1;
  endtask

  initial begin
    real h2a, h3a, h2b, h3b, h2c, h3c;
    word_t a2h, a3h;
    // ---------------- part 1: live blocks, coherent tone ----------------
    fin = 12.0 / real'(N);
    bg_mode = 1;
    do_reset();
    repeat (8) step();
    align(N / 12);
    measure(N, 12, h2a, h3a);
    align(N / 12);
    cal_en = 1;
    repeat (59 * N) step();
    measure(N, 12, h2b, h3b);
    $display("background: alpha2=%0d alpha3=%0d", alpha2, alpha3);
    expect_drop("bg HD2", h2a, h2b, 10.0);
    expect_drop("bg HD3", h3a, h3b, 20.0);
    // abandon a block, then freeze
    repeat (N / 2) step();
    cal_en = 0;
    repeat (8) step();
    a2h = alpha2; a3h = alpha3;
    repeat (N) step();
    measure(N, 12, h2c, h3c);
    checks++;
    if (alpha2 != a2h || alpha3 != a3h) begin failures++; $display("coefficients moved while frozen"); end
    expect_drop("frozen HD3", h3a, h3c, 20.0);
    // foreground calibration continues from the stored coefficients
    bg_mode = 0; n_switch++;
    align(N / 12);
    cal_en = 1;
    repeat (39 * N) step();
    measure(N, 12, h2b, h3b);
    $display("foreground: alpha2=%0d alpha3=%0d", alpha2, alpha3);
    expect_drop("fg HD3", h3a, h3b, 20.0);
    // ---------------- part 2: record mode, non-coherent tone ----------------
    fin = 1.0 / 450.0;
    bg_mode = 1; n_switch++;
    do_reset();
    repeat (8) step();
    align(450);
    measure(9 * 450, 9, h2a, h3a);
    align(450);
    capture = 1; step(); capture = 0;
    n_capture++;
    while (!captured) step();
    rec_mode = 1; cal_en = 1;
    repeat (60 * N + 4) step();
    rec_mode = 0; cal_en = 0;
    repeat (8) step();
    $display("record: alpha2=%0d alpha3=%0d", alpha2, alpha3);
    align(450);
    measure(9 * 450, 9, h2b, h3b);
    expect_drop("record HD2", h2a, h2b, 10.0);
    expect_drop("record HD3", h3a, h3b, 20.0);
    expect_seen("background blocks", n_bg);
    expect_seen("foreground blocks", n_fg);
    expect_seen("abandoned blocks", n_abandon);
    expect_seen("frozen samples corrected", n_frozen_corr);
    expect_seen("buffer bypasses", n_bypass);
    expect_seen("mode switches", n_switch);
    expect_seen("records captured", n_capture);
    expect_seen("replayed blocks", n_replay_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
