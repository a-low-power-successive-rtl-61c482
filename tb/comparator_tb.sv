// comparator_tb: self-checking testbench of the comparator model.
//
// Checks the polarity (high when the + input, V_DAC, is above the - input,
// V_H), that a disabled comparator answers low whatever its inputs, and
// that decisions are counted only in enabled clock cycles.
module comparator_tb;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic        clk = 1'b0, en = 1'b0, out;
  real         vp = 0.0, vn = 0.0;
  int unsigned dec;
  always #5 clk = ~clk;

  comparator u_dut (.clk(clk), .en(en), .v_p(vp), .v_n(vn), .out(out), .decisions(dec));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned d0;
    real a, b;
    @(negedge clk);
    d0 = dec;
    en = 1'b1;
    for (int i = 0; i < 40; i++) begin
      a = real'($urandom_range(0, 1000)) / 1000.0;
      b = (i % 5 == 0) ? a : real'($urandom_range(0, 1000)) / 1000.0;
      vp = a; vn = b;
      #1;
      check(out == (a > b), $sformatf("vp=%f vn=%f out=%b", a, b, out));
      @(negedge clk);
    end
    check(dec - d0 == 40, $sformatf("%0d decisions counted in 40 enabled cycles", dec - d0));
    en = 1'b0;
    d0 = dec;
    vp = 0.8; vn = 0.1;
    #1;
    check(out == 1'b0, "disabled comparator must answer low");
    repeat (10) @(negedge clk);
    check(dec == d0, "no decisions while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
