// Testbench for the coefficient update: random block errors and step sizes;
// the stored coefficient must follow acc += floor(err*mu / 2^12), clipped to
// 27 bits, change only on err_valid, and report clipping. Reset clears it.
//
// A free-running clock; err_valid pulses come with random gaps and the
// reference is updated on the same edge, so the stored coefficient is
// compared one clock after every pulse. The LMS rule alpha += mu * err is the
// published one; the step scaling, the 27-bit register and the clipping are
// this design's own choices, and the reference copies them.
module tb_alpha_update;
  import cal_pkg::*;
  logic clk = 0, rst_n = 0, err_valid = 0;
  logic signed [42:0] err = 0;
  logic signed [7:0] mu = 0;
  word_t alpha;
  logic saturated;
  int checks = 0, failures = 0;

  alpha_update #(.ERR_W(43), .FRAC_EXT(12), .MU_SHIFT(12)) dut (
    .clk, .rst_n, .err_valid, .err, .mu, .alpha, .saturated);

  always #5 clk = ~clk;

  function automatic longint fdiv(input longint a, input int sh);
    longint q = 64'sd1 <<< sh;
    if (a >= 0) return a / q;
    return -((-a + q - 1) / q);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, s, amax, amin;
    bit sat;
    int nsat;
    amax = (64'sd1 <<< 26) - 1; amin = -(64'sd1 <<< 26);
    acc = 0; sat = 0; nsat = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (alpha != 0) failures++;
    for (int k = 0; k < 1500; k++) begin
      err_valid = ($urandom_range(0, 2) != 0);
      if (k > 600 && k < 700) err = 43'(64'sd1 <<< 30);   // drive into the upper clip
      else if (k > 900 && k < 1000) err = -43'(64'sd1 <<< 30);
      else err = 43'($signed($urandom_range(0, 2000000))) - 43'sd1000000;
      mu = (k > 600 && k < 1000) ? 8'sd100 : 8'($urandom);
      if (err_valid) begin
        s = acc + fdiv(longint'(err) * longint'(mu), 12);
        sat = (s > amax) || (s < amin);
        if (sat) nsat++;
        if (s > amax) s = amax;
        if (s < amin) s = amin;
        acc = s;
      end
      @(posedge clk); #1;
      checks += 2;
      if (longint'(alpha) != fdiv(acc, 12)) begin
        failures++; $display("k=%0d alpha=%0d expected=%0d", k, alpha, fdiv(acc, 12));
      end
      if (saturated != sat) begin failures++; $display("k=%0d saturated=%b", k, saturated); end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("clipping never exercised"); end
    rst_n = 0; #1;
    checks++;
    if (alpha != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
