// Behavioural model (not synthesisable): analog input attenuator.
//
// The second ADC of the front end sees the input scaled by about one half, so
// that its linear signal is halved while its harmonics shrink by a different
// factor. The gain is only approximately 0.5 in silicon; any error is taken up
// by the calibration loop, so GAIN can be set away from 0.5 to model it.
// Ports: vin, vout (real voltages). No delay is modelled.
// The factor of one half follows the published architecture; modelling it
// as an ideal real-valued gain is this design's choice.
module input_attenuator #(
  parameter real GAIN = 0.5
) (
  input  real vin,
  output real vout
);
  assign vout = vin * GAIN;
endmodule
