// sample_hold_tb: self-checking testbench of the sample-and-hold model.
//
// While 'sample' is high V_H must follow V_in; after 'sample' falls, V_H must
// keep the value V_in had at that moment while V_in keeps moving.
module sample_hold_tb;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic sample = 1'b0;
  real  vin = 0.0, vh;

  sample_hold u_dut (.sample(sample), .v_in(vin), .v_h(vh));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real held;
    for (int n = 0; n < 20; n++) begin
      sample = 1'b1;
      for (int i = 0; i < 5; i++) begin
        vin = real'($urandom_range(0, 999)) / 1000.0;
        #10;
        check(vh == vin, $sformatf("tracking: vh=%f vin=%f", vh, vin));
      end
      held = vin;
      sample = 1'b0;
      for (int i = 0; i < 8; i++) begin
        #10;
        vin = real'($urandom_range(0, 999)) / 1000.0;
        #1;
        check(vh == held, $sformatf("holding: vh=%f expected %f", vh, held));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
