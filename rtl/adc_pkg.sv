// adc_pkg: constants and types shared by the SA-ADC blocks.
//
// The converter resolves ADC_N bits. Its successive-approximation sequencer
// can skip the ADC_N-ADC_K most significant bits when a new sample lies in
// the same 2^-(ADC_N-ADC_K)*Vref wide window as the previous one, and then
// searches only the ADC_K least significant bits. ADC_N = 8, ADC_K = 4 and a
// 1 V reference are the values of the 8-bit, 10 kS/s converter this RTL
// follows. One conversion takes ADC_N+2 clock cycles (sampling, decision and
// ADC_N conversion cycles), so 10 kS/s needs a 100 kHz clock.
package adc_pkg;

  parameter int unsigned ADC_N = 8;       // resolution in bits
  parameter int unsigned ADC_K = 4;       // LSBs searched in the short conversion
  parameter real         ADC_VREF = 1.0;  // reference voltage in volts

  // Phase of one conversion, as seen by the sequencer.
  typedef enum logic [1:0] {
    PH_SAMPLE  = 2'd0,   // S/H tracks Vin; DAC still shows the previous code
    PH_DECIDE  = 2'd1,   // DAC shows V_DAC,H or V_DAC,L
    PH_CONVERT = 2'd2    // ADC_N cycles of binary search / comparator sleep
  } phase_e;

endpackage
