// Testbench for the ring VCO model: for several constant inputs the taps seen
// after each clock must show the ring state of an independently accumulated
// phase, the phase rate must follow the tuning curve, and the rate must clamp.
//
// The analog input is held constant for a run of clocks; the model's taps
// are read after each edge. The 15-cell ring is the published one; the
// tuning curve, its constants and the clamp are this design's own model.
module tb_ring_vco;
  localparam int CELLS = 15;
  logic clk = 0, rst_n = 0;
  real  vin = 0.0;
  logic [CELLS-1:0] taps;
  int checks = 0, failures = 0;

  ring_vco #(.CELLS(CELLS), .F0_STEPS(15.0), .KV_STEPS(10.0), .K2(0.2), .K3(-0.3))
    dut (.clk, .rst_n, .vin, .taps);

  always #5 clk = ~clk;

  // ring pattern for phase p: a run of flipped cells from cell 0 (first half
  // period), or the run of cells not yet flipped back (second half)
  function automatic logic [CELLS-1:0] pattern(input int p);
    logic [CELLS-1:0] alt, run;
    for (int i = 0; i < CELLS; i++) alt[i] = (i % 2 == 1);
    if (p <= CELLS) run = CELLS'((64'd1 << p) - 1);
    else            run = ~CELLS'((64'd1 << (p - CELLS)) - 1);
    return alt ^ run;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph, r, v;
    automatic real vs[5] = '{0.0, 0.5, -0.5, 0.9, 3.0};
    repeat (2) @(posedge clk);
    #1 if (taps !== pattern(0)) failures++;
    checks++;
    foreach (vs[j]) begin
      rst_n = 0; vin = vs[j];
      @(posedge clk); #1 rst_n = 1;
      v = vs[j];
      r = 15.0 + 10.0 * (v + 0.2 * v * v - 0.3 * v * v * v);
      if (r > 28.999) r = 28.999;
      if (r < 0.0) r = 0.0;
      ph = 0.0;
      repeat (40) begin
        @(posedge clk); #1;
        ph = ph + r;
        if (ph >= 30.0) ph = ph - 30.0;
        checks++;
        if (taps !== pattern($rtoi(ph))) begin
          failures++;
          $display("vin=%f phase=%f taps=%b expected=%b", v, ph, taps, pattern($rtoi(ph)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
