// Phase quantizer of the VCO-based delta-sigma ADC.
//
// On every clock edge the CELLS ring-oscillator taps are captured in a
// register; the captured pattern is decoded into the ring phase 0..2*CELLS-1.
// Decoding: XOR with the reset pattern (tap i = i mod 2) marks the inverters
// that have flipped in the current oscillation. In the first half-period the
// flipped inverters are a run starting at tap 0, so the phase is their count;
// in the second half tap 0 has flipped back and the phase is 2*CELLS minus the
// count of those still flipped.
//
// Ports: taps (asynchronous ring outputs), phase (combinational decode of the
// register, valid one edge after the taps were sampled).
// The published design names a clocked phase quantizer; the decoder is this design's.
module phase_quantizer #(
  parameter int CELLS = 15,
  localparam int PW   = $clog2(2 * CELLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CELLS-1:0] taps,
  output logic [PW-1:0]    phase
);
  logic [CELLS-1:0] taps_q, flipped, init_pat;
  logic [PW-1:0]    cnt;

  always_comb
    for (int i = 0; i < CELLS; i++) init_pat[i] = logic'(i % 2);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) taps_q <= init_pat;
    else        taps_q <= taps;

  always_comb begin
    flipped = taps_q ^ init_pat;
    cnt = '0;
    for (int i = 0; i < CELLS; i++) cnt = cnt + PW'(flipped[i]);
    if (flipped[0] || cnt == '0) phase = cnt;
    else                         phase = PW'(2 * CELLS) - cnt;
  end
endmodule
