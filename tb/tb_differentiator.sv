// Testbench for the differentiator: a phase that advances by random steps
// modulo 30 must give those steps back one clock later, with valid rising on
// the third clock after reset.
//
// The phase is presented one value per clock after reset; count is compared
// on every edge once valid. The first difference of the ring phase is the
// published ADC structure; the modulo-30 wrap, the register and the
// valid-after-reset timing are this design's own.
module tb_differentiator;
  logic clk = 0, rst_n = 0;
  logic [4:0] phase = 0, count;
  logic valid;
  int checks = 0, failures = 0;

  differentiator #(.CELLS(15)) dut (.clk, .rst_n, .phase, .count, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step, prev_step, acc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    acc = 0; step = 0; prev_step = 0;
    for (int k = 0; k < 1000; k++) begin
      prev_step = step;
      step = (k % 97 == 0) ? 29 : (k % 89 == 0) ? 0 : int'($urandom_range(0, 29));
      acc = (acc + step) % 30;
      phase = 5'(acc);
      @(posedge clk); #1;
      // after this edge count holds the difference presented at this edge
      if (k == 0 || k == 1) begin
        checks++;
        if (valid) begin failures++; $display("valid early at k=%0d", k); end
      end else begin
        checks++;
        if (!valid || count != 5'(step)) begin
          failures++;
          $display("k=%0d step=%0d count=%0d valid=%b", k, step, count, valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
