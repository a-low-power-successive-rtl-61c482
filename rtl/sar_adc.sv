// sar_adc: low-power successive-approximation ADC for slowly varying
// signals such as ECG.
//
// Structure: the input sample-and-hold drives the - input of the comparator
// with V_H; a binary-weighted capacitive DAC drives its + input with V_DAC;
// the SAR and control block sets the DAC switches from the comparator's
// answers and produces D_1..D_N.
//
// A conversion lasts N+2 clock cycles: sampling, decision, N conversion
// cycles. During sampling the DAC still holds the previous result, so the
// first comparison tells whether the new sample went up or down. The
// decision cycle then moves only the K LSB capacitors, to the top (V_DAC,H)
// or bottom (V_DAC,L) of the previous sample's 2^-(N-K)*Vref window. If the
// new sample is inside that window, only the K LSBs are searched and the
// comparator is turned off for the last N-K cycles; otherwise a complete
// N-bit search runs. With N = 8, K = 4 and a 100 kHz clock this is the
// 8-bit, 10 kS/s converter the design targets.
//
// Interface: clk, rst_n (asynchronous, active low), v_in (input voltage in
// volts, expected in [0, VREF)); dout/dout_valid/lsb_mode as in sar_ctrl;
// phase, comp_en, dac_code and v_dac show the conversion phase, the
// comparator enable, the switch state and the DAC voltage; q_ref,
// switch_events and comp_decisions are running totals of charge drawn
// from Vref (Cu*Vref units), capacitor bottom-plate switchings and
// comparator decisions.
//
// The comparator, DAC and S/H are behavioural models carrying real-valued
// voltages; only sar_ctrl is synthesizable logic. The block structure and
// connections follow the published converter; the reset, the result strobe
// and all observation outputs (phase through comp_decisions) are this
// design's own additions.
module sar_adc
  import adc_pkg::*;
#(
  parameter int unsigned N    = ADC_N,
  parameter int unsigned K    = ADC_K,
  parameter real         VREF = ADC_VREF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  real          v_in,
  output logic [N-1:0] dout,
  output logic         dout_valid,
  output logic         lsb_mode,
  output logic         sample,
  output logic         comp_en,
  output phase_e       phase,
  output logic [N-1:0] dac_code,
  output real          v_dac,
  output real          q_ref,
  output int unsigned  switch_events,
  output int unsigned  comp_decisions
);

  real    v_h;
  logic   comp;

  sample_hold u_sh (
    .sample (sample),
    .v_in   (v_in),
    .v_h    (v_h)
  );

  cap_dac #(.N(N), .VREF(VREF)) u_dac (
    .sw            (dac_code),
    .v_dac         (v_dac),
    .q_ref         (q_ref),
    .switch_events (switch_events)
  );

  comparator u_cmp (
    .clk       (clk),
    .en        (comp_en),
    .v_p       (v_dac),
    .v_n       (v_h),
    .out       (comp),
    .decisions (comp_decisions)
  );

  sar_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .comp       (comp),
    .sample     (sample),
    .comp_en    (comp_en),
    .dac_code   (dac_code),
    .dout       (dout),
    .dout_valid (dout_valid),
    .lsb_mode   (lsb_mode),
    .phase      (phase)
  );

endmodule
