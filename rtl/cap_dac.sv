// cap_dac: behavioural model (not synthesizable logic) of the
// binary-weighted capacitive DAC with its bottom-plate switches.
//
// The array holds C_i = 2^(N-i) Cu for i = 1..N plus one dummy Cu that is
// always at Vss, 2^N Cu in all. Switch control sw[N-i] puts the bottom plate
// of C_i on Vref (1) or Vss (0). The top plates form the V_DAC node, which
// is never reset, so with an ideal array
//     V_DAC = Vref * sw / 2^N.
// The model also integrates the charge that Vref delivers at each switching
// event, which is what the converter's DAC power is made of. For a change
// from code a to code b (fractions A = a/2^N, B = b/2^N of full scale) only
// the capacitors at Vref after the event draw charge from it:
//     dQ = sum over bits at Vref after: C_j * ((Vref - V_B) - (v_j,before - V_A))
//        = Cu*Vref * ( b*(1 - B + A) - (a AND b) )
// 'q_ref' is the running total in units of Cu*Vref; the energy is
// Vref * q_ref * Cu * Vref. A negative step means charge returned to Vref.
//
// Interface: sw (switch controls, MSB = C_1), v_dac (volts), q_ref, and
// 'switch_events' counting capacitors whose bottom plate changed. No clock:
// the outputs follow sw immediately (an ideal, settled array).
// Capacitor mismatch, parasitics and settling are not modelled.
module cap_dac
  import adc_pkg::*;
#(
  parameter int unsigned N    = ADC_N,
  parameter real         VREF = ADC_VREF
) (
  input  logic [N-1:0] sw,
  output real          v_dac,
  output real          q_ref,
  output int unsigned  switch_events
);

  localparam real FULL = real'(2.0 ** N);

  logic [N-1:0] sw_prev;
  real          q_acc;
  int unsigned  ev_acc;

  initial begin
    sw_prev = '0;
    q_acc   = 0.0;
    ev_acc  = 0;
  end

  always @(sw) begin
    q_acc   = q_acc + real'(sw) * (1.0 - real'(sw) / FULL + real'(sw_prev) / FULL)
                    - real'(sw & sw_prev);
    ev_acc  = ev_acc + $countones(sw ^ sw_prev);
    sw_prev = sw;
  end

  assign v_dac         = VREF * real'(sw) / FULL;
  assign q_ref         = q_acc;
  assign switch_events = ev_acc;

endmodule
