// sar_adc_tb: end-to-end, self-checking testbench of the whole converter at
// its default size (8 bits, K = 4, Vref = 1 V, 100 kHz clock = 10 kS/s).
//
// Input: a synthetic ECG-like waveform, two heartbeats of 0.8 s, built from
// Gaussian P, Q, R, S and T waves on a 0.44 V baseline with slow baseline
// wander and a little noise (16000 samples), followed by 200 samples of
// random full-scale jumps. The waveform is computed here; no data file is
// read.
//
// Per conversion it checks
//   - the code, against floor(v_in * 256 / Vref) of the value applied
//     during the sampling cycle;
//   - the conversion frame of N+2 = 10 cycles between results;
//   - the short/complete choice, worked out from the previous code;
//   - that the comparator is off exactly during the last N-K cycles of a
//     short conversion.
// At the end it checks the DAC model's charge total against a per-capacitor
// charge calculation done here from the observed switch states, and that
// every mechanism happened: short conversions entered from above and below,
// complete searches for samples above V_DAC,H and below V_DAC,L, and
// comparator sleep cycles. It also prints the DAC charge and the comparator
// activity next to those of a conventional SAR (all capacitors reset in the
// sampling phase, a complete search every time) converting the same codes.
module sar_adc_tb;
  import adc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int    N      = ADC_N;
  localparam int    K      = ADC_K;
  localparam real   VREF   = ADC_VREF;
  localparam real   TCLK   = 10000.0;        // 100 kHz, in ns
  localparam int    NBEAT  = 16000;          // two 0.8 s beats at 10 kS/s
  localparam int    NJUMP  = 200;
  localparam real   PI     = 3.14159265358979;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic        clk = 1'b0, rst_n = 1'b0;
  real         v_in = 0.0;
  logic [N-1:0] dout, dac_code;
  logic        dout_valid, lsb_mode, sample, comp_en;
  phase_e      phase;
  real         v_dac, q_ref;
  int unsigned switch_events, comp_decisions;

  always #(TCLK / 2) clk = ~clk;

  sar_adc u_adc (
    .clk(clk), .rst_n(rst_n), .v_in(v_in),
    .dout(dout), .dout_valid(dout_valid), .lsb_mode(lsb_mode),
    .sample(sample), .comp_en(comp_en), .phase(phase), .dac_code(dac_code),
    .v_dac(v_dac), .q_ref(q_ref), .switch_events(switch_events),
    .comp_decisions(comp_decisions)
  );

  initial begin
    repeat ((NBEAT + NJUMP + 20) * (N + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ECG-like test signal, volts, t in seconds.
  function automatic real gauss(input real t, input real mu, input real sigma);
    return $exp(-((t - mu) * (t - mu)) / (2.0 * sigma * sigma));
  endfunction

  function automatic real ecg(input real t);
    real tb;
    tb = t - 0.8 * $floor(t / 0.8) - 0.4;     // R peak at 0.4 s of each beat
    return 0.44
         + 0.010 * $sin(2.0 * PI * 0.3 * t)
         + 0.015 * gauss(tb, -0.20, 0.025)    // P
         - 0.020 * gauss(tb, -0.03, 0.008)    // Q
         + 0.250 * gauss(tb,  0.00, 0.010)    // R
         - 0.050 * gauss(tb,  0.03, 0.008)    // S
         + 0.040 * gauss(tb,  0.25, 0.040);   // T
  endfunction

  // Charge drawn from Vref (Cu*Vref) when the switches go from a to b,
  // summed capacitor by capacitor.
  function automatic real step_charge(input logic [N-1:0] a, input logic [N-1:0] b);
    real va, vb, q, w;
    va = real'(a) / real'(2 ** N);
    vb = real'(b) / real'(2 ** N);
    q = 0.0;
    for (int j = 0; j < N; j++) begin
      w = real'(2 ** j);
      if (b[j]) q += w * ((1.0 - vb) - ((a[j] ? 1.0 : 0.0) - va));
    end
    return q;
  endfunction

  // Conventional SAR converting to 'code': reset to 0, then N trials.
  function automatic real conv_charge(input logic [N-1:0] from, input logic [N-1:0] code);
    logic [N-1:0] c, t;
    real q;
    q = step_charge(from, '0);
    c = '0;
    for (int j = N - 1; j >= 0; j--) begin
      t = c;
      t[j] = 1'b1;
      q += step_charge(c, t);
      c = t;
      c[j] = code[j];
    end
    return q;
  endfunction

  // Observed switch states, for the independent charge total.
  real          q_obs = 0.0;
  logic [N-1:0] code_seen = '0;
  always @(dac_code) begin
    q_obs += step_charge(code_seen, dac_code);
    code_seen = dac_code;
  end

  int n_short_up = 0, n_short_down = 0, n_full_above = 0, n_full_below = 0;
  int n_sleep = 0, n_conv = 0;
  real q_conv = 0.0, q_ecg = 0.0, q_conv_ecg = 0.0;
  int  dec_ecg = 0, sleep_ecg = 0;

  initial begin
    int prev, expv, cyc, en_cyc, dec;
    bit higher, in_win;
    real v, q_start;
    int unsigned dec_start;
    logic [N-1:0] conv_last;

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    prev = 0;
    conv_last = '0;
    q_start = q_ref;
    q_obs = q_ref;
    dec_start = comp_decisions;

    for (int s = 0; s < NBEAT + NJUMP; s++) begin
      if (s == NBEAT) begin
        q_ecg = q_ref - q_start; q_conv_ecg = q_conv;
        dec_ecg = comp_decisions - dec_start; sleep_ecg = n_sleep;
      end
      if (s < NBEAT) v = ecg(real'(s) * 1.0e-4) + (real'($urandom_range(0, 200)) - 100.0) * 1.0e-5;
      else           v = real'($urandom_range(0, 99999)) / 100000.0 * VREF;
      // in the sampling cycle
      while (phase != PH_SAMPLE) @(negedge clk);
      v_in = v;
      expv = int'($floor(v / VREF * real'(2 ** N)));
      if (expv > 2 ** N - 1) expv = 2 ** N - 1;
      higher = (v >= VREF * real'(prev) / real'(2 ** N));
      dec    = higher ? (prev | (2 ** K - 1)) : (prev & ~(2 ** K - 1));
      in_win = higher ? (v <  VREF * real'(dec) / real'(2 ** N))
                      : (v >= VREF * real'(dec) / real'(2 ** N));
      cyc = 0; en_cyc = 0;
      forever begin
        if (comp_en) en_cyc++;
        else if (!(in_win && cyc >= K + 2)) check(1'b0, $sformatf("sample %0d: comparator off in cycle %0d", s, cyc));
        @(posedge clk);
        cyc++;
        #1;
        if (dout_valid || cyc > 2 * N + 4) break;
        @(negedge clk);
      end
      @(negedge clk);
      check(cyc == N + 2, $sformatf("sample %0d: %0d cycles per conversion", s, cyc));
      check(int'(dout) == expv, $sformatf("sample %0d: v=%f code %0d expected %0d", s, v, dout, expv));
      check(lsb_mode == in_win, $sformatf("sample %0d: short=%0b expected %0b", s, lsb_mode, in_win));
      check(en_cyc == (in_win ? K + 2 : N + 2), $sformatf("sample %0d: comparator on %0d cycles", s, en_cyc));
      if (in_win) begin
        n_sleep += N - K;
        if (higher) n_short_up++; else n_short_down++;
      end else begin
        if (higher) n_full_above++; else n_full_below++;
      end
      q_conv += conv_charge(conv_last, expv[N-1:0]);
      conv_last = expv[N-1:0];
      prev = expv;
      n_conv++;
    end

    check((q_ref - q_obs) < 1e-6 && (q_obs - q_ref) < 1e-6,
          $sformatf("DAC charge %f, per-capacitor sum %f", q_ref, q_obs));
    check(n_short_up   > 0, "no short conversion entered from above the previous sample");
    check(n_short_down > 0, "no short conversion entered from below the previous sample");
    check(n_full_above > 0, "no complete search for a sample above V_DAC,H");
    check(n_full_below > 0, "no complete search for a sample below V_DAC,L");
    check(n_sleep      > 0, "comparator never slept");

    $display("conversions %0d: short %0d (up %0d, down %0d), complete %0d (above %0d, below %0d)",
             n_conv, n_short_up + n_short_down, n_short_up, n_short_down,
             n_full_above + n_full_below, n_full_above, n_full_below);
    $display("ECG part, %0d samples:", NBEAT);
    $display("  comparator: %0.2f decisions per sample; conventional %0d per sample",
             real'(dec_ecg) / real'(NBEAT), N);
    $display("  comparator-on cycles saved against %0d-cycle frames: %0.1f %%",
             N + 2, 100.0 * real'(sleep_ecg) / real'(NBEAT * (N + 2)));
    $display("  DAC charge from Vref: %0.1f Cu*Vref, conventional %0.1f, saving %0.1f %%",
             q_ecg, q_conv_ecg, 100.0 * (1.0 - q_ecg / q_conv_ecg));
    check(q_ecg < q_conv_ecg, "DAC charge not below that of a conventional SAR on the ECG input");
    $display("capacitor switchings: %0d", switch_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
