// lrfsc_timing: sample phase, 40.512 MHz strobe and RF pulse timing.
//
// The IF signal is sampled at exactly four times its frequency, so each
// 81.024 MHz clock carries one quarter of an IF period. A free-running 2-bit
// counter numbers those quarters (0: I, 1: Q, 2: -I, 3: -Q); the three
// demodulators and the modulator share it so that receive and transmit use
// the same phase reference. ce40 is high on the clocks where phase is odd,
// giving the 40.512 MHz rate of the I/Q streams.
//
// RF ON (high during the linac pulse) is synchronised with two flip-flops.
// pulse_start / pulse_end are one-clock strobes on its rising and falling
// edges. sample_idx counts 40.512 MHz samples from the start of the pulse and
// addresses the set-point and feed-forward memories; it stops at its last
// value rather than wrapping. The synchroniser adds two clocks of latency.
// The pulse behaviour follows the source design; the synchroniser, the phase
// numbering and the saturating counter are this design's choices.
module lrfsc_timing #(
  parameter int unsigned IDX_W = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rf_on,        // asynchronous RF ON pulse
  output logic [1:0]       phase,        // quarter-period number of the current ADC sample
  output logic             ce40,         // 40.512 MHz sample strobe
  output logic             rfon_s,       // synchronised RF ON
  output logic             pulse_start,  // one clock at the rising edge of RF ON
  output logic             pulse_end,    // one clock at the falling edge of RF ON
  output logic [IDX_W-1:0] sample_idx    // samples since the start of the pulse
);

  logic [1:0] sync;
  logic       rfon_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      sync       <= '0;
      rfon_d     <= 1'b0;
      sample_idx <= '0;
    end else begin
      phase  <= phase + 2'd1;
      sync   <= {sync[0], rf_on};
      rfon_d <= sync[1];
      if (pulse_start)
        sample_idx <= '0;
      else if (rfon_s && ce40 && sample_idx != '1)
        sample_idx <= sample_idx + 1'b1;
    end
  end

  assign rfon_s      = sync[1];
  assign ce40        = phase[0];
  assign pulse_start = sync[1] & ~rfon_d;
  assign pulse_end   = ~sync[1] & rfon_d;

endmodule
