// Shared word format of the harmonic-distortion calibration datapath.
//
// Every sample and coefficient is a signed 15-bit word: the engine works with
// 15-bit precision words. The binary point sits after the sign bit (Q1.14), so
// a word is a fraction of ADC full scale in [-1, 1). The helper functions
// truncate a double-width product back to this format and saturate a wide sum
// into it; all arithmetic blocks use them so that their rounding is identical.
// The 15-bit word length is the published engine precision; the Q1.14
// scaling, truncation toward minus infinity and saturation are this design's.
package cal_pkg;
  localparam int W    = 15;      // word width
  localparam int FRAC = W - 1;   // fraction bits of a Q1.14 word

  typedef logic signed [W-1:0] word_t;

  localparam word_t WORD_MAX = word_t'({1'b0, {(W-1){1'b1}}});
  localparam word_t WORD_MIN = word_t'({1'b1, {(W-1){1'b0}}});

  // Saturate a 48-bit signed value into one word.
  function automatic word_t sat_word(input logic signed [47:0] v);
    if (v > 48'(signed'(WORD_MAX))) return WORD_MAX;
    if (v < 48'(signed'(WORD_MIN))) return WORD_MIN;
    return word_t'(v);
  endfunction

  // Product of two Q1.14 values, truncated (floor) back to Q1.14 scale.
  // Kept 48 bits wide so that -1 * -1 = +1 does not wrap before saturation.
  function automatic logic signed [47:0] qmul(input logic signed [47:0] a,
                                                 input logic signed [47:0] b);
    logic signed [47:0] p;
    p = a * b;
    return p >>> FRAC;
  endfunction
endpackage
