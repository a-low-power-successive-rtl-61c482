// cap_dac_tb: self-checking testbench of the capacitive DAC model.
//
// A 4-bit array (16 Cu in all) is stepped through a conventional binary
// search and some other code changes. V_DAC must equal Vref*code/16; the
// charge drawn from Vref at each step is compared with values worked out by
// hand from the charge on every capacitor before and after the step (for
// example 0000 -> 1000 draws 4 Cu*Vref: C_1 = 8 Cu charged to Vref/2).
// An 8-bit instance checks the full-scale levels and the switch count.
module cap_dac_tb;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  logic [3:0]  sw4 = '0;
  real         v4, q4;
  int unsigned ev4;
  cap_dac #(.N(4), .VREF(1.0)) u4 (.sw(sw4), .v_dac(v4), .q_ref(q4), .switch_events(ev4));

  logic [7:0]  sw8 = '0;
  real         v8, q8;
  int unsigned ev8;
  cap_dac #(.N(8), .VREF(0.9)) u8 (.sw(sw8), .v_dac(v8), .q_ref(q8), .switch_events(ev8));

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code, expected V_DAC (Vref = 1), charge drawn in this step (Cu*Vref)
  typedef struct { logic [3:0] code; real v; real dq; } step_t;
  step_t steps [8] = '{
    '{4'b1000, 0.5,    4.0},    // C1 up: 8*(1-0.5)
    '{4'b1100, 0.75,   1.0},    // C1: 4 -> 2 (-2), C2: -2 -> 1 (+3)
    '{4'b1010, 0.625,  3.25},   // C1: 2 -> 3 (+1), C3 (2 Cu): -1.5 -> 0.75
    '{4'b1011, 0.6875, 0.3125}, // C1 -0.5, C3 -0.125, C4: -0.625 -> 0.3125
    '{4'b1011, 0.6875, 0.0},    // no change
    '{4'b0000, 0.0,    0.0},    // all to Vss: nothing drawn
    '{4'b1111, 0.9375, 0.9375}, // 15*(1-0.9375)
    '{4'b0001, 0.0625, 0.875}   // C4 stays at Vref: 0.0625 -> 0.9375
  };

  initial begin
    real q_before;
    int unsigned ev_before;
    #10;
    for (int i = 0; i < 8; i++) begin
      q_before  = q4;
      ev_before = ev4;
      sw4 = steps[i].code;
      #10;
      check(near(v4, steps[i].v), $sformatf("step %0d: V_DAC %f expected %f", i, v4, steps[i].v));
      check(near(q4 - q_before, steps[i].dq),
            $sformatf("step %0d: charge %f expected %f", i, q4 - q_before, steps[i].dq));
    end
    check(ev4 == 1 + 1 + 2 + 1 + 0 + 3 + 4 + 3, $sformatf("4-bit switch events %0d", ev4));

    // 8-bit, Vref = 0.9 V: levels and switch counting
    sw8 = 8'h80; #10;
    check(near(v8, 0.45), $sformatf("8-bit half scale %f", v8));
    check(near(q8, 64.0), $sformatf("8-bit first step charge %f (2^(N-2))", q8));
    sw8 = 8'hFF; #10;
    check(near(v8, 0.9 * 255.0 / 256.0), $sformatf("8-bit top %f", v8));
    sw8 = 8'h01; #10;
    check(near(v8, 0.9 / 256.0), $sformatf("8-bit LSB %f", v8));
    check(ev8 == 1 + 7 + 7, $sformatf("8-bit switch events %0d", ev8));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
