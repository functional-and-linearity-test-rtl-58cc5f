// meas_combine: one measurement per channel and per 40 us packet from the
// current-to-frequency converter of the tunnel card.
//
// Each tunnel-card channel integrates the chamber current; the counter
// gives the number of integrator resets during the 40 us period and the
// ADC sample gives the integrator voltage, whose change adds the fraction
// of a count. Both enter the final current. This block computes
//     meas = cnt * 2**ADC_W + (adc_prev - adc_now)
// i.e. one count weighs a full ADC span, clamped to 0 .. 2**MEAS_W-1.
// The first packet after reset, or after clear, uses a zero ADC change.
// The weighting and the sign of the ADC change are this design's choice;
// the published description only says that both values enter the result.
// Timing: in_valid -> out_valid after one clock.
module meas_combine
  import blecft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  in_valid,
  input  cnt_t  cnt [NUM_CH],
  input  adc_t  adc [NUM_CH],
  output logic  out_valid,
  output meas_t meas [NUM_CH]
);
  adc_t adc_prev [NUM_CH];
  logic have_prev;

  function automatic meas_t combine(cnt_t c, adc_t now, adc_t prev, logic use_prev);
    logic signed [MEAS_W+1:0] v;
    v = $signed({2'b00, c, {ADC_W{1'b0}}});
    if (use_prev) v = v + $signed({{(MEAS_W-ADC_W+2){1'b0}}, prev})
                        - $signed({{(MEAS_W-ADC_W+2){1'b0}}, now});
    if (v < 0)                                          return '0;
    if (v > $signed({2'b00, {MEAS_W{1'b1}}}))           return '1;
    return v[MEAS_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      out_valid <= 1'b0;
      have_prev <= 1'b0;
      for (int c = 0; c < int'(NUM_CH); c++) begin
        adc_prev[c] <= '0;
        meas[c]     <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        have_prev <= 1'b1;
        for (int c = 0; c < int'(NUM_CH); c++) begin
          meas[c]     <= combine(cnt[c], adc[c], adc_prev[c], have_prev);
          adc_prev[c] <= adc[c];
        end
      end
    end
  end
endmodule
