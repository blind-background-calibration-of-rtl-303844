// Signal remover: forms the signal-free stream of the background mode.
//
//   d_nosig = d_full - 2 * d_half
//
// d_full comes from the ADC driven by Vin, d_half from the ADC driven by about
// Vin/2. Doubling the second cancels the linear signal, but a k-th harmonic
// scales by 2^-k in the half path, so what is left is distortion only (for a
// cubic term 3/4 of it, for a square term 1/2). Combinational; the result
// saturates to one Q1.14 word (this design's choice).
module signal_remover
  import cal_pkg::*;
(
  input  word_t d_full,
  input  word_t d_half,
  output word_t d_nosig
);
  always_comb d_nosig = sat_word(48'(d_full) - 48'(d_half) * 48'sd2);
endmodule
