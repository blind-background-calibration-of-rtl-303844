// VCO-based first-order delta-sigma ADC.
//
// A supply-controlled ring VCO turns the input voltage into phase; the phase
// quantizer samples the ring every clock and the differentiator (1 - z^-1)
// turns phase into steps per sample. Because phase is the integral of
// frequency and the quantizer error is differentiated, the output is the input
// with first-order shaped quantization noise. The step count (0..2*CELLS-1)
// is centred on MID and scaled by 2^SHIFT into a signed Q1.14 word, the format
// of the calibration engine (MID and SHIFT are this design's choice).
//
// Timing: dout changes on every clock edge; dout_valid rises three edges after
// reset (tap register, previous-phase register, output register).
// The ring VCO is a behavioural model, so only the quantizer, differentiator
// and scaling of this wrapper synthesise.
module vco_dsm_adc
  import cal_pkg::*;
#(
  parameter int  CELLS    = 15,
  parameter int  MID      = 15,
  parameter int  SHIFT    = 10,
  parameter real F0_STEPS = 15.0,
  parameter real KV_STEPS = 10.0,
  parameter real K2       = 0.0,
  parameter real K3       = 0.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  real   vin,
  output word_t dout,
  output logic  dout_valid
);
  localparam int PW = $clog2(2 * CELLS);

  logic [CELLS-1:0] taps;
  logic [PW-1:0]    phase, count;

  ring_vco #(.CELLS(CELLS), .F0_STEPS(F0_STEPS), .KV_STEPS(KV_STEPS),
             .K2(K2), .K3(K3)) u_vco (
    .clk, .rst_n, .vin, .taps);

  phase_quantizer #(.CELLS(CELLS)) u_pq (
    .clk, .rst_n, .taps, .phase);

  differentiator #(.CELLS(CELLS)) u_diff (
    .clk, .rst_n, .phase, .count, .valid(dout_valid));

  always_comb dout = word_t'((int'(count) - MID) <<< SHIFT);
endmodule
