// Differentiator (1 - z^-1) of the VCO-based delta-sigma ADC.
//
// The ring phase is the integral of the VCO frequency; its first difference
// is the number of phase steps made in one sample period, which is the
// first-order noise-shaped ADC output. The difference is taken modulo the
// ring length 2*CELLS, so the VCO must make fewer than 2*CELLS steps per
// sample.
//
// Ports: phase (from the phase quantizer), count (registered step count,
// 0..2*CELLS-1), valid (high from the second sample after reset on, when the
// previous phase is a real sample).
// The first-difference structure follows the published VCO ADC; the modulo
// arithmetic, the registered output and the valid flag are this design's.
module differentiator #(
  parameter int CELLS = 15,
  localparam int PW   = $clog2(2 * CELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] phase,
  output logic [PW-1:0] count,
  output logic          valid
);
  logic [PW-1:0] phase_d;
  logic [1:0]    seen;
  logic [PW:0]   diff;

  always_comb begin
    diff = {1'b0, phase} - {1'b0, phase_d};
    if (phase < phase_d) diff = diff + (PW+1)'(2 * CELLS);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase_d <= '0;
      count   <= '0;
      seen    <= '0;
      valid   <= 1'b0;
    end else begin
      phase_d <= phase;
      count   <= diff[PW-1:0];
      if (seen != 2'd2) seen <= seen + 2'd1;
      valid   <= (seen == 2'd2);
    end
endmodule
