// Testbench for the harmonic correlator (K = 3, N = 31, and K = 2, N = 20):
// random streams in blocks, with idle cycles and one abandoned block; each
// block's err must equal sum_n e[n]*d[K*n] computed here from stored copies
// of the streams, and must appear exactly one clock after the last sample.
//
// Two instances run side by side, each fed only in its own blocks; first and
// last are driven here. The sum of e[n] * d[K*n] is the published
// selective-sampling error; the block framing, the buffer with its m = 0
// bypass and the one-clock result timing are this design's own.
module tb_harmonic_correlator;
  import cal_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, first = 0, last = 0;
  logic sel3 = 0;   // which instance the current block goes to
  word_t e = 0, d = 0;
  logic signed [34:0] err3;
  logic signed [34:0] err2;
  logic errv3, errv2;
  int checks = 0, failures = 0;

  harmonic_correlator #(.K(3), .N(31)) dut3 (.clk, .rst_n, .valid(valid && sel3), .first, .last, .e, .d,
                                             .err(err3), .err_valid(errv3));
  harmonic_correlator #(.K(2), .N(20)) dut2 (.clk, .rst_n, .valid(valid && !sel3), .first, .last, .e, .d,
                                             .err(err2), .err_valid(errv2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one block of n samples into the selected instance and check it
  task automatic run_block(input int kk, input int nn, input int abandon_at);
    int ev[64], dv[64];
    longint ref_sum;
    bit seen;
    sel3 = (kk == 3);
    for (int m = 0; m < nn; m++) begin
      while ($urandom_range(0, 3) == 0) begin
        valid = 0; first = 0; last = 0;
        @(posedge clk); #1;
        checks++;
        if (errv3 || errv2) begin failures++; $display("err_valid during block"); end
      end
      ev[m] = (m % 5 == 4) ? -16384 : int'($signed($urandom_range(0, 32767))) - 16384;
      dv[m] = (m % 7 == 6) ? -16384 : int'($signed($urandom_range(0, 32767))) - 16384;
      e = word_t'(ev[m]); d = word_t'(dv[m]);
      valid = 1; first = (m == 0); last = (m == nn - 1);
      if (m == abandon_at) return;   // leave it unfinished; the next first restarts
      @(posedge clk); #1;
      if (m != nn - 1) begin
        checks++;
        if (errv3 || errv2) begin failures++; $display("early err_valid"); end
      end
    end
    ref_sum = 0;
    for (int n = 0; kk * n < nn; n++) ref_sum += longint'(ev[n]) * longint'(dv[kk * n]);
    valid = 0; first = 0; last = 0;
    seen = (kk == 3) ? errv3 : errv2;
    checks += 2;
    if (!seen) begin failures++; $display("err_valid missing K=%0d", kk); end
    if (((kk == 3) ? longint'(err3) : longint'(err2)) != ref_sum) begin
      failures++;
      $display("K=%0d err=%0d expected=%0d", kk, (kk == 3) ? longint'(err3) : longint'(err2), ref_sum);
    end
    @(posedge clk); #1;
    checks++;
    if (errv3 || errv2) begin failures++; $display("err_valid longer than one clock"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int b = 0; b < 40; b++) begin
      if (b % 2 == 0) run_block(3, 31, (b == 6) ? 17 : -1);
      else            run_block(2, 20, (b == 9) ? 5 : -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
