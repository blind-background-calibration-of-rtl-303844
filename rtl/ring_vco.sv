// Behavioural model (not synthesisable): supply-controlled ring VCO.
//
// The oscillator is a ring of CELLS (15) inverters whose supply is the analog
// input, so the input voltage sets how fast a transition runs around the ring.
// One full oscillation period is 2*CELLS phase steps: a transition passes
// every inverter once with each polarity. The model keeps the ring phase as a
// real number in steps and advances it once per sampling-clock edge by the
// number of steps the ring makes in one sample period:
//
//   steps/sample = F0_STEPS + KV_STEPS * (v + K2*v^2 + K3*v^3)
//
// F0_STEPS and KV_STEPS set the free-running frequency and the gain; K2 and K3
// bend the tuning curve and so create the 2nd and 3rd harmonic distortion that
// the calibration removes. The rate is clamped to [0, 2*CELLS-1) so the
// first-order difference downstream never wraps ambiguously.
//
// The taps show the ring state for integer phase p: starting from the
// alternating reset pattern (tap i = i mod 2), tap i has flipped once p > i
// and flipped back once p > i+CELLS. Because the taps change on the clock
// edge, a register sampling them on the same edge sees the state just before
// it, which is what the clocked phase quantizer observes.
//
// Ports: clk (sampling instants), rst_n (phase to 0), vin (real, nominally
// -1..1), taps (CELLS inverter outputs).
// The cell count is the published one; the tuning-curve parameters and the
// state-per-edge view of the ring are this model's own.
module ring_vco #(
  parameter int  CELLS    = 15,
  parameter real F0_STEPS = 15.0,
  parameter real KV_STEPS = 10.0,
  parameter real K2       = 0.0,
  parameter real K3       = 0.0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  real              vin,
  output logic [CELLS-1:0] taps
);
  localparam int STEPS = 2 * CELLS;

  real phase;   // ring phase in steps, [0, STEPS)

  function automatic real rate(input real v);
    real r;
    r = F0_STEPS + KV_STEPS * (v + K2 * v * v + K3 * v * v * v);
    if (r < 0.0) r = 0.0;
    if (r > real'(STEPS) - 1.001) r = real'(STEPS) - 1.001;
    return r;
  endfunction

  function automatic logic [CELLS-1:0] ring_state(input int p);
    logic [CELLS-1:0] s;
    for (int i = 0; i < CELLS; i++)
      s[i] = logic'(i % 2) ^ ((p > i) ^ (p > i + CELLS));
    return s;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    real nxt;
    if (!rst_n) begin
      phase <= 0.0;
      taps  <= ring_state(0);
    end else begin
      nxt = phase + rate(vin);
      if (nxt >= real'(STEPS)) nxt = nxt - real'(STEPS);
      phase <= nxt;
      taps  <= ring_state($rtoi(nxt));
    end
  end
endmodule
