// Testbench for the phase quantizer: every ring state of a 15-cell ring, in
// random order, must decode to its phase one clock after it is presented.
//
// Each state is applied after a rising edge and the decoded phase checked on
// the next. The 15-cell ring is the published one; the tap pattern, the
// decoding and the one-clock latency are this design's own.
module tb_phase_quantizer;
  localparam int CELLS = 15;
  logic clk = 0, rst_n = 0;
  logic [CELLS-1:0] taps;
  logic [4:0] phase;
  int checks = 0, failures = 0;

  phase_quantizer #(.CELLS(CELLS)) dut (.clk, .rst_n, .taps, .phase);

  always #5 clk = ~clk;

  // ring state: cell i has toggled (p > i) times minus (p > i+CELLS) times
  function automatic logic [CELLS-1:0] state_of(input int p);
    logic [CELLS-1:0] s;
    for (int i = 0; i < CELLS; i++)
      s[i] = (i % 2 == 1) ^ (p > i && !(p > i + CELLS));
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    taps = state_of(0);
    repeat (2) @(posedge clk);
    #1 checks++;
    if (phase != 0) failures++;
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      p = (k < 30) ? k : int'($urandom_range(0, 29));
      taps = state_of(p);
      @(posedge clk); #1;
      checks++;
      if (phase != 5'(p)) begin
        failures++;
        $display("p=%0d taps=%b phase=%0d", p, taps, phase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
