// Testbench for the harmonic corrector: random and corner samples and
// coefficients; each output (one clock later) is compared with
// d - a2*d^2 - a3*d^3 computed here with floor-scaled integer products and
// clipped to the 15-bit range.
//
// in_valid is toggled at random; out_valid and dcal are checked one edge
// after each input. The correction polynomial is the published one; the
// 15-bit word, the truncating products and the saturation are this design's
// own choices, and the reference applies the same rounding.
module tb_harmonic_corrector;
  import cal_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  word_t din = 0, alpha2 = 0, alpha3 = 0, dcal;
  int checks = 0, failures = 0;

  harmonic_corrector dut (.clk, .rst_n, .in_valid, .din, .alpha2, .alpha3, .out_valid, .dcal);

  always #5 clk = ~clk;

  // floor(a*b / 2^14) with plain integer arithmetic
  function automatic longint fmul(input longint a, input longint b);
    longint p;
    p = a * b;
    if (p >= 0) return p / 16384;
    return -((-p + 16383) / 16384);
  endfunction

  function automatic longint model(input longint d, input longint a2, input longint a3);
    longint s, c, y;
    s = fmul(d, d);
    c = fmul(s, d);
    y = d - fmul(a2, s) - fmul(a3, c);
    if (y > 16383) y = 16383;
    if (y < -16384) y = -16384;
    return y;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    automatic int corner[6] = '{-16384, 16383, 0, 1, -1, 8192};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k < 36) begin
        din = word_t'(corner[k % 6]);
        alpha2 = word_t'(corner[k / 6]);
        alpha3 = word_t'(-corner[(k + 2) % 6]);
      end else begin
        din = word_t'($urandom);
        alpha2 = (k % 3 == 0) ? word_t'($urandom) : word_t'($signed($urandom_range(0, 2000)) - 1000);
        alpha3 = (k % 5 == 0) ? word_t'($urandom) : word_t'($signed($urandom_range(0, 4000)) - 2000);
      end
      in_valid = (k % 7 != 3);
      exp_v = model(din, alpha2, alpha3);
      @(posedge clk); #1;
      checks++;
      if (out_valid != in_valid) begin failures++; $display("valid mismatch k=%0d", k); end
      if (in_valid) begin
        checks++;
        if (longint'(dcal) != exp_v) begin
          failures++;
          $display("d=%0d a2=%0d a3=%0d got %0d expected %0d", din, alpha2, alpha3, dcal, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
