// sample_hold: behavioural model (not synthesizable logic) of the input
// sample-and-hold, a sampling switch followed by the capacitor C_S.
//
// While 'sample' is high the switch is closed and V_H follows V_in; when it
// opens, V_H keeps the last value for the decision and conversion phases.
// The switch and capacitor are ideal: no charge injection, droop or
// bandwidth limit. The held node starts at 0 V.
module sample_hold (
  input  logic sample,
  input  real  v_in,
  output real  v_h
);

  real held;

  initial held = 0.0;

  always_latch if (sample) held = v_in;

  assign v_h = held;

endmodule
