// sar_adc_ksweep_tb: the whole 8-bit converter with every window size
// K = 1 .. 7, side by side.
//
// K is the number of LSBs searched when a sample stays near the previous
// one, and is meant to be chosen to suit the input signal. Each instance
// converts its own slowly drifting input with occasional full-scale jumps.
// For every conversion the code must equal floor(v_in * 2^N / Vref), the
// short/complete choice must match the window of the previous code, and the
// comparator must be enabled for exactly K+2 cycles of a short conversion
// and N+2 of a complete one. Each instance must see both kinds.
module sar_adc_ksweep_tb;
  import adc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int  N     = 8;
  localparam real VREF  = 1.0;
  localparam int  NSAMP = 1500;

  int checks = 0, failures = 0, done = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat ((NSAMP + 20) * (N + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar K = 1; K < N; K++) begin : g_k
    real          v_in = 0.0, v_dac, q_ref;
    logic [N-1:0] dout, dac_code;
    logic         dout_valid, lsb_mode, sample, comp_en;
    phase_e       phase;
    int unsigned  sw_ev, dec;

    sar_adc #(.N(N), .K(K), .VREF(VREF)) u_adc (
      .clk(clk), .rst_n(rst_n), .v_in(v_in),
      .dout(dout), .dout_valid(dout_valid), .lsb_mode(lsb_mode),
      .sample(sample), .comp_en(comp_en), .phase(phase), .dac_code(dac_code),
      .v_dac(v_dac), .q_ref(q_ref), .switch_events(sw_ev), .comp_decisions(dec)
    );

    initial begin
      int prev, expv, dcode, en_cyc, n_short, n_full, errs, cnt;
      bit higher, in_win;
      real v;
      prev = 0; n_short = 0; n_full = 0; errs = 0; cnt = 0;
      v = 0.3;
      @(posedge rst_n);
      for (int s = 0; s < NSAMP; s++) begin
        if ($urandom_range(0, 19) == 0) v = real'($urandom_range(0, 9999)) / 10000.0;
        else v = v + (real'($urandom_range(0, 2000)) - 1000.0) * 2.0e-6 * real'(1 << K);
        if (v < 0.0) v = 0.0;
        if (v > 0.9999) v = 0.9999;
        while (phase != PH_SAMPLE) @(negedge clk);
        v_in = v;
        expv   = int'($floor(v * real'(2 ** N) / VREF));
        higher = (v >= VREF * real'(prev) / real'(2 ** N));
        dcode  = higher ? (prev | (2 ** K - 1)) : (prev & ~(2 ** K - 1));
        in_win = higher ? (v <  VREF * real'(dcode) / real'(2 ** N))
                        : (v >= VREF * real'(dcode) / real'(2 ** N));
        en_cyc = 0;
        for (int c = 0; c < N + 2; c++) begin
          if (comp_en) en_cyc++;
          @(negedge clk);
        end
        cnt += 4;
        if (!dout_valid || phase != PH_SAMPLE) errs++;   // N+2 cycle frame
        if (int'(dout) != expv) begin
          errs++;
          $display("FAIL: K=%0d sample %0d: code %0d expected %0d", K, s, dout, expv);
        end
        if (lsb_mode != in_win) errs++;
        if (en_cyc != (in_win ? K + 2 : N + 2)) errs++;
        if (in_win) n_short++; else n_full++;
        prev = expv;
      end
      $display("K=%0d: %0d short, %0d complete conversions", K, n_short, n_full);
      if (n_short == 0 || n_full == 0) errs++;
      checks += cnt + 1;
      failures += errs;
      done++;
      if (done == N - 1) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

endmodule
