// Harmonic corrector: removes 2nd and 3rd order distortion from one ADC path.
//
//   dcal[n+1] = d[n] - alpha2 * d[n]^2 - alpha3 * d[n]^3
//
// This is the calibrated-output equation with the two harmonics of the main
// configuration. All values are signed Q1.14 words; each product is truncated
// back to Q1.14 (arithmetic shift, i.e. rounding toward minus infinity) and
// the result saturates to one word. The squares and cubes are computed from
// the raw sample, as the equation prescribes.
//
// Timing: one register stage; dcal and out_valid follow din and in_valid by
// one clock, and the coefficients in effect are those present with din.
// The equation and its one-sample latency follow the published design; the
// truncation and saturation are this design's choice.
module harmonic_corrector
  import cal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t din,
  input  word_t alpha2,
  input  word_t alpha3,
  output logic  out_valid,
  output word_t dcal
);
  logic signed [47:0] d, sq, cube, h2, h3, y;

  always_comb begin
    d    = 48'(din);
    sq   = qmul(d, d);
    cube = qmul(sq, d);
    h2   = qmul(48'(alpha2), sq);
    h3   = qmul(48'(alpha3), cube);
    y    = d - h2 - h3;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dcal      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dcal <= sat_word(y);
    end
endmodule
