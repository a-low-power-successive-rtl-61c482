// sar_ctrl: successive-approximation register and sequencer with the
// "previous-sample window" switching algorithm.
//
// What it does
//   Each conversion takes N+2 clock cycles and the converter runs freely,
//   one conversion after the other:
//     SAMPLE   (1 cycle)  'sample' is high, the S/H tracks Vin. The DAC keeps
//                         the previous result, so at the end of the cycle
//                         the comparator tells whether the new sample is
//                         above or below the previous one.
//     DECIDE   (1 cycle)  the M = N-K MSBs stay as they were; the K LSBs are
//                         all set to 1 (new sample higher: V_DAC,H) or all
//                         cleared (new sample lower: V_DAC,L). A second
//                         comparison tells whether the sample lies inside the
//                         window [V_DAC,L, V_DAC,H) of the previous MSBs.
//     CONVERT  (N cycles) inside the window: a binary search on the K LSBs
//                         only (K cycles), then the comparator is switched
//                         off for the remaining M cycles. Outside: a complete
//                         binary search on all N bits, starting from
//                         100..0 as a conventional SAR does.
//   The result is identical to a conventional SAR conversion; only the
//   number of capacitor switchings and comparator decisions differs.
//
// Interface
//   comp      comparator output, high when V_DAC (+ input) is above the
//             held sample V_H (- input); the bit under test is therefore
//             set to !comp. It is read at the rising clock edge that ends
//             the cycle in which 'dac_code' was applied.
//   comp_en   comparator enable; low only while the comparator sleeps after
//             a short (K-bit) conversion.
//   dac_code  capacitor switch controls, 1 = bottom plate at Vref, 0 = at
//             Vss. Bit N-i drives C_i = 2^(N-i) Cu, so dac_code[N-1] is C_1.
//   dout      D_1..D_N (dout[N-1] = D_1), updated with a one-cycle
//             'dout_valid' pulse at the clock edge that ends a conversion.
//   lsb_mode  with dout_valid: 1 when the conversion was a K-bit search.
//   phase     current phase, for observation.
//
// Own choices (the algorithm, N, K and the N+2 cycle frame follow the
// source design): an asynchronous active-low reset that clears the
// code (all capacitors to Vss), free-running conversions, the exact
// cycle in which each comparison is taken, and ties (sample equal to a DAC
// level) being counted as "higher or equal".
module sar_ctrl
  import adc_pkg::*;
#(
  parameter int unsigned N = ADC_N,   // resolution
  parameter int unsigned K = ADC_K    // LSBs searched in the short conversion
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         comp,
  output logic         sample,
  output logic         comp_en,
  output logic [N-1:0] dac_code,
  output logic [N-1:0] dout,
  output logic         dout_valid,
  output logic         lsb_mode,
  output phase_e       phase
);

  localparam int unsigned CW = $clog2(N);

  phase_e          state_q;
  logic [N-1:0]    code_q, code_d;     // capacitor switch state
  logic [CW-1:0]   bit_q;              // bit under test during the search
  logic [CW-1:0]   cnt_q;              // conversion cycle 0..N-1
  logic            searching_q;        // comparator in use in CONVERT
  logic            higher_q;           // new sample >= previous result
  logic            short_q;            // current conversion is K-bit only
  logic            ge;                 // sample >= present DAC level

  assign ge       = ~comp;
  assign sample   = (state_q == PH_SAMPLE);
  assign comp_en  = (state_q != PH_CONVERT) || searching_q;
  assign dac_code = code_q;
  assign phase    = state_q;

  // Code register update for the bit under test.
  always_comb begin
    code_d = code_q;
    if (state_q == PH_CONVERT && searching_q) begin
      code_d[bit_q] = ge;
      if (bit_q != '0) code_d[bit_q-1] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= PH_SAMPLE;
      code_q      <= '0;
      bit_q       <= '0;
      cnt_q       <= '0;
      searching_q <= 1'b0;
      higher_q    <= 1'b0;
      short_q     <= 1'b0;
      dout        <= '0;
      dout_valid  <= 1'b0;
      lsb_mode    <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      unique case (state_q)
        PH_SAMPLE: begin
          // Sample vs previous result decides V_DAC,H or V_DAC,L.
          higher_q          <= ge;
          code_q[K-1:0]     <= ge ? {K{1'b1}} : {K{1'b0}};
          state_q           <= PH_DECIDE;
        end
        PH_DECIDE: begin
          // Higher branch: inside when below V_DAC,H.
          // Lower branch:  inside when at or above V_DAC,L.
          cnt_q       <= '0;
          searching_q <= 1'b1;
          state_q     <= PH_CONVERT;
          if (higher_q ? !ge : ge) begin
            short_q       <= 1'b1;
            code_q[K-1:0] <= {1'b1, {(K-1){1'b0}}};
            bit_q         <= CW'(K-1);
          end else begin
            short_q <= 1'b0;
            code_q  <= {1'b1, {(N-1){1'b0}}};
            bit_q   <= CW'(N-1);
          end
        end
        PH_CONVERT: begin
          code_q <= code_d;
          cnt_q  <= cnt_q + 1'b1;
          if (searching_q) begin
            if (bit_q == '0) searching_q <= 1'b0;
            else             bit_q       <= bit_q - 1'b1;
          end
          if (cnt_q == CW'(N-1)) begin
            dout       <= code_d;
            dout_valid <= 1'b1;
            lsb_mode   <= short_q;
            state_q    <= PH_SAMPLE;
          end
        end
        default: state_q <= PH_SAMPLE;
      endcase
    end
  end

  // A short search must end before the N-cycle conversion frame does, and a
  // complete one exactly at its last cycle.
  initial begin
    assert (K >= 1 && K < N) else $fatal(1, "sar_ctrl: need 1 <= K < N");
  end

  property p_search_ends_in_frame;
    @(posedge clk) disable iff (!rst_n)
      (state_q == PH_CONVERT && cnt_q == CW'(N-1)) |-> (!searching_q || bit_q == '0);
  endproperty
  a_search_ends_in_frame: assert property (p_search_ends_in_frame);

  // The M MSBs never switch during a short conversion.
  property p_msbs_still;
    @(posedge clk) disable iff (!rst_n)
      (state_q == PH_CONVERT && short_q) |=> $stable(code_q[N-1:K]);
  endproperty
  a_msbs_still: assert property (p_msbs_still);

endmodule
