// comparator: behavioural model (not synthesizable logic) of the converter's
// comparator.
//
// The DAC output drives the + input and the held sample V_H the - input, so
// 'out' is high when V_DAC is above V_H. The comparator has a power-down
// input: with 'en' low it is switched off, makes no decision and its output
// is held low. The decision is ideal and instantaneous (no offset, noise or
// delay); the sequencer reads it at the clock edge that ends each cycle.
// 'decisions' counts the clock cycles in which it was enabled, a measure of
// its power, which is spent per decision.
module comparator (
  input  logic        clk,
  input  logic        en,
  input  real         v_p,
  input  real         v_n,
  output logic        out,
  output int unsigned decisions
);

  int unsigned dec_acc;

  initial dec_acc = 0;

  always @(posedge clk) if (en) dec_acc <= dec_acc + 1;

  assign out       = en && (v_p > v_n);
  assign decisions = dec_acc;

endmodule
