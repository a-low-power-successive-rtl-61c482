// sar_ctrl_tb: self-checking testbench of the SAR sequencer.
//
// The analog side is replaced by integers: the held sample is 'vh', in
// 1/16 LSB steps, and the comparator answers dac_code*16 > vh. Two
// instances run:
//   u8  (N = 8, K = 4): a random walk of samples, mostly small steps with
//       occasional jumps and samples placed exactly on the window edges.
//       Every conversion is checked for the result (floor(vh/16)), for the
//       short/complete choice worked out from the previous result, for the
//       decision-phase DAC level, for the N+2 cycle frame, for the number
//       of cycles the comparator is enabled (K+2 or N+2) and for the MSB
//       capacitors never moving in a short conversion.
//   u4  (N = 4, K = 2): the four branches of the 4-bit example with previous
//       code 1001; the DAC code of every cycle is compared with a sequence
//       worked out by hand from the switching rules.
module sar_ctrl_tb;
  import adc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- N = 8
  localparam int N8 = 8, K8 = 4;
  int          vh8;
  logic        comp8, sample8, comp_en8, valid8, lsb8;
  logic [7:0]  code8, dout8;
  phase_e      phase8;

  assign comp8 = comp_en8 && (int'(code8) * 16 > vh8);

  sar_ctrl #(.N(N8), .K(K8)) u8 (
    .clk(clk), .rst_n(rst_n), .comp(comp8), .sample(sample8),
    .comp_en(comp_en8), .dac_code(code8), .dout(dout8),
    .dout_valid(valid8), .lsb_mode(lsb8), .phase(phase8)
  );

  // ---------------------------------------------------------------- N = 4
  int          vh4;
  logic        comp4, sample4, comp_en4, valid4, lsb4;
  logic [3:0]  code4, dout4;
  phase_e      phase4;

  assign comp4 = comp_en4 && (int'(code4) * 16 > vh4);

  sar_ctrl #(.N(4), .K(2)) u4 (
    .clk(clk), .rst_n(rst_n), .comp(comp4), .sample(sample4),
    .comp_en(comp_en4), .dac_code(code4), .dout(dout4),
    .dout_valid(valid4), .lsb_mode(lsb4), .phase(phase4)
  );

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One 8-bit conversion of 'v' (1/16 LSB units); the sample is applied in
  // the SAMPLE cycle, everything is observed at the falling edges.
  int prev8 = 0;
  int n_short8 = 0, n_full8 = 0, n_hi_in = 0, n_lo_in = 0, n_hi_out = 0, n_lo_out = 0;

  task automatic convert8(input int v);
    int cyc, en_cyc, msb_moves, exp_code, dec_code;
    bit higher, in_win;
    logic [7:0] msb_ref;
    // wait for the sampling cycle
    do @(negedge clk); while (phase8 != PH_SAMPLE);
    vh8 = v;
    higher   = (v >= prev8 * 16);
    dec_code = higher ? (prev8 | 8'h0F) : (prev8 & 8'hF0);
    in_win   = higher ? (v < dec_code * 16) : (v >= dec_code * 16);
    exp_code = v / 16;
    cyc = 0; en_cyc = 0; msb_moves = 0;
    msb_ref = code8;
    check(code8 == 8'(prev8), $sformatf("sampling: DAC %0h should hold previous %0h", code8, prev8));
    forever begin
      if (comp_en8) en_cyc++;
      if (cyc == 1) check(code8 == 8'(dec_code),
                          $sformatf("decision DAC %0h, expected %0h", code8, dec_code));
      if (code8[7:4] != msb_ref[7:4]) msb_moves++;
      @(posedge clk);
      cyc++;
      #1;
      if (valid8) break;
      @(negedge clk);
      if (cyc > 20) break;
    end
    check(cyc == N8 + 2, $sformatf("conversion took %0d cycles", cyc));
    check(dout8 == 8'(exp_code), $sformatf("v=%0d: dout %0h expected %0h", v, dout8, exp_code));
    check(lsb8 == in_win, $sformatf("v=%0d prev=%0h: lsb_mode %0b expected %0b", v, prev8, lsb8, in_win));
    check(en_cyc == (in_win ? K8 + 2 : N8 + 2), $sformatf("comparator enabled %0d cycles", en_cyc));
    if (in_win) begin
      check(msb_moves == 0, "MSB capacitors switched in a short conversion");
      n_short8++;
      if (higher) n_hi_in++; else n_lo_in++;
    end else begin
      n_full8++;
      if (higher) n_hi_out++; else n_lo_out++;
    end
    prev8 = exp_code;
  endtask

  // One 4-bit conversion with the DAC code of all six cycles compared.
  task automatic convert4(input int v, input logic [3:0] seq [6], input logic [3:0] res,
                          input bit short_exp, input string name);
    logic [3:0] got [6];
    do @(negedge clk); while (phase4 != PH_SAMPLE);
    vh4 = v;
    for (int i = 0; i < 6; i++) begin
      got[i] = code4;
      if (i == 2 + 2 && short_exp) check(!comp_en4, {name, ": comparator should be off"});
      @(negedge clk);
    end
    for (int i = 0; i < 6; i++)
      check(got[i] == seq[i], $sformatf("%s cycle %0d: DAC %b expected %b", name, i, got[i], seq[i]));
    check(dout4 == res, $sformatf("%s: dout %b expected %b", name, dout4, res));
    check(lsb4 == short_exp, $sformatf("%s: lsb_mode %b", name, lsb4));
  endtask

  // Bring the 4-bit converter's previous code to 1001 (from any code).
  task automatic set4_1001();
    logic [3:0] s [6];
    do @(negedge clk); while (phase4 != PH_SAMPLE);
    vh4 = 9 * 16 + 5;
    repeat (6) @(negedge clk);
    check(dout4 == 4'b1001, "4-bit: setting previous code 1001");
  endtask

  initial begin
    int v;
    vh8 = 0; vh4 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    fork
      begin : t8
        // edges of the window around the previous result
        convert8(100 * 16 + 3);
        convert8(100 * 16 + 3);                 // equal sample
        convert8(((100 | 15) * 16) - 1);        // just below V_DAC,H
        convert8((100 | 15) * 16);              // exactly at V_DAC,H -> full
        convert8((111 & 8'hF0) * 16);           // exactly at V_DAC,L -> short
        convert8((96 * 16) - 1);                // just below V_DAC,L -> full
        convert8(0);
        convert8(255 * 16 + 15);
        v = 128 * 16;
        for (int i = 0; i < 600; i++) begin
          if ($urandom_range(0, 9) == 0) v = $urandom_range(0, 4095);
          else v = v + int'($urandom_range(0, 160)) - 80;
          if (v < 0) v = 0;
          if (v > 4095) v = 4095;
          convert8(v);
        end
      end
      begin : t4
        logic [3:0] s [6];
        set4_1001();
        s = '{4'b1001, 4'b1011, 4'b1010, 4'b1011, 4'b1010, 4'b1010};
        convert4(10 * 16 + 3, s, 4'b1010, 1'b1, "higher, in_win");
        set4_1001();
        s = '{4'b1001, 4'b1000, 4'b1010, 4'b1001, 4'b1000, 4'b1000};
        convert4(8 * 16 + 7, s, 4'b1000, 1'b1, "lower, in_win");
        set4_1001();
        s = '{4'b1001, 4'b1011, 4'b1000, 4'b1100, 4'b1110, 4'b1111};
        convert4(14 * 16 + 8, s, 4'b1110, 1'b0, "higher, outside");
        set4_1001();
        s = '{4'b1001, 4'b1000, 4'b1000, 4'b0100, 4'b0010, 4'b0011};
        convert4(40, s, 4'b0010, 1'b0, "lower, outside");
      end
    join

    $display("8-bit: %0d short (%0d up, %0d down), %0d complete (%0d above V_DAC,H, %0d below V_DAC,L)",
             n_short8, n_hi_in, n_lo_in, n_full8, n_hi_out, n_lo_out);
    check(n_hi_in > 0 && n_lo_in > 0 && n_hi_out > 0 && n_lo_out > 0, "all four branches taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
