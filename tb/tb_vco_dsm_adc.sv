// Testbench for the VCO delta-sigma ADC: with a constant input the ring makes
// r steps per sample, so each output count must be floor(r) or ceil(r), the
// sum of M counts must be within one step of M*r (first-order noise shaping
// telescopes the quantization error), and each word must be the count
// centred on 15 and scaled by 2^10. dout_valid must rise on the third edge.
//
// The input is a real value held for each run; the words are checked on
// every edge. The VCO delta-sigma structure follows the source; the
// centring and scaling of the 30-level count to a 15-bit word are this
// design's own.
module tb_vco_dsm_adc;
  import cal_pkg::*;
  logic clk = 0, rst_n = 0;
  real  vin = 0.0;
  word_t dout;
  logic dout_valid;
  int checks = 0, failures = 0;

  vco_dsm_adc #(.K2(0.1), .K3(-0.2)) dut (.clk, .rst_n, .vin, .dout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real vs[6] = '{0.0, 0.4, -0.4, 0.83, -0.91, 0.05};
    real r, v, sum;
    int cnt, lo, hi, edges;
    foreach (vs[j]) begin
      rst_n = 0; v = vs[j]; vin = v;
      @(posedge clk); #1 rst_n = 1;
      edges = 0;
      while (!dout_valid) begin @(posedge clk); #1 edges++; end
      checks++;
      if (edges != 3) begin failures++; $display("valid after %0d edges", edges); end
      r = 15.0 + 10.0 * (v + 0.1 * v * v - 0.2 * v * v * v);
      lo = $rtoi(r); hi = lo + 1;
      sum = 0.0;
      for (int k = 0; k < 200; k++) begin
        cnt = int'(dout) / 1024 + 15;
        checks += 2;
        if (int'(dout) % 1024 != 0) begin failures++; $display("word not scaled: %0d", dout); end
        if (cnt != lo && cnt != hi) begin
          failures++; $display("v=%f r=%f count=%0d", v, r, cnt);
        end
        sum += real'(cnt);
        @(posedge clk); #1;
      end
      checks++;
      if (sum - 200.0 * r > 1.0001 || 200.0 * r - sum > 1.0001) begin
        failures++; $display("v=%f sum=%f expected=%f", v, sum, 200.0 * r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
