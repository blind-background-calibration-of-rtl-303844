// Testbench for the signal remover: d_full - 2*d_half, clipped to 15 bits,
// over corner and random words.
//
// Purely combinational: each pair of inputs is applied and the output read
// after a short delay. Subtracting twice the half-scale stream is the
// published method; the clipping is this design's own.
module tb_signal_remover;
  import cal_pkg::*;
  word_t d_full, d_half, d_nosig;
  int checks = 0, failures = 0;

  signal_remover dut (.d_full, .d_half, .d_nosig);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    automatic int corner[5] = '{-16384, 16383, 0, 5000, -8000};
    for (int k = 0; k < 1025; k++) begin
      if (k < 25) begin
        d_full = word_t'(corner[k % 5]); d_half = word_t'(corner[k / 5]);
      end else begin
        d_full = word_t'($urandom); d_half = (k % 2 == 0) ? word_t'($urandom) : word_t'(int'(d_full) / 2 + int'($urandom_range(0, 40)) - 20);
      end
      #1;
      e = int'(d_full) - 2 * int'(d_half);
      if (e > 16383) e = 16383;
      if (e < -16384) e = -16384;
      checks++;
      if (int'(d_nosig) != e) begin
        failures++; $display("%0d - 2*%0d = %0d, expected %0d", d_full, d_half, d_nosig, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
