// iq_demod: digital I/Q demodulator for an IF sampled at four times its
// frequency.
//
// With the 20.256 MHz IF sampled at 81.024 MHz, consecutive ADC samples are
// I, Q, -I, -Q, I, ... Demodulation therefore needs no multipliers: the
// samples of quarter 0 and 1 are taken as they are, those of quarters 2 and 3
// are negated, and each pair is emitted as one I/Q sample at 40.512 MS/s.
// The sample sequence is the source design's; taking I on phase 0 (the
// reference the modulator also uses) is this design's choice.
//
// Timing: out is registered; out_valid pulses for one clock, on the clock
// after the Q sample (phase 1 or 3) was presented, i.e. every second clock.
// The output holds its value between strobes.
module iq_demod
  import lrfsc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc,    // ADC sample, two's complement
  input  logic [1:0]              phase,  // quarter-period number of adc
  output iq_t                     out,
  output logic                    out_valid
);

  iq_word_t x, i_hold;

  // sign-extend and negate on the second half period
  always_comb begin
    x = iq_word_t'(adc);
    if (phase[1]) x = -x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_hold    <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= phase[0];
      if (!phase[0]) i_hold <= x;
      else           out    <= '{i: i_hold, q: x};
    end
  end

  // the output rate is half the sample rate: never two strobes in a row
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);

endmodule
