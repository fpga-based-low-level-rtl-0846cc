// cavity_model: behavioural model (testbench only) of everything outside the
// FPGA in the RF loop: DAC, up-conversion, amplifier, cavity, pick-ups,
// down-conversion and the three ADCs, all seen at the 20.256 MHz IF.
//
// The drive I/Q is recovered from the DAC samples (at quarter-period p the
// first DAC sample of the clock is I, Q, -I or -Q). The cavity is the
// baseband first-order low-pass of a resonator driven at resonance,
// dV/dt = sigma * (G - V), with sigma = 119380 rad/s (half bandwidth of the
// Linac 3 ramping cavity) and unity DC gain. A beam-loading current can be
// subtracted from V. The loop outside the FPGA adds DELAY clocks of transport
// delay and a phase rotation THETA_DEG for cables; the ADC samples are
// V_rot * cos / sin at the sampling phase, rounded and saturated to 14 bits.
// The forward pick-up sees the delayed drive, the reflected one the
// difference between drive and cavity field.
module cavity_model #(
  parameter int  DELAY     = 38,
  parameter real THETA_DEG = 40.0,
  parameter real SIGMA     = 119380.0,
  parameter real FS        = 81.024e6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [13:0] dac_a,
  input  logic               bypass,     // when high, adc_cav is driven by adc_force
  input  logic signed [13:0] adc_force,
  input  real                beam_i,     // beam-loading current (I, ADC units)
  input  real                beam_q,
  output logic signed [13:0] adc_ref,
  output logic signed [13:0] adc_fwd,
  output logic signed [13:0] adc_cav,
  output real                v_i,        // cavity field as seen by the FPGA
  output real                v_q         // (after the cable rotation)
);

  localparam real PI = 3.14159265358979;
  real alpha, c, s;
  real g_i = 0.0, g_q = 0.0, cav_i = 0.0, cav_q = 0.0;
  real dl_gi [DELAY], dl_gq [DELAY];
  logic [1:0] ph;

  function automatic logic signed [13:0] q14(real x);
    if (x > 8191.0) return 14'sd8191;
    if (x < -8192.0) return -14'sd8192;
    return 14'($rtoi(x + ((x >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real if_sample(real i, real q, logic [1:0] p);
    case (p)
      2'd0: return i;
      2'd1: return q;
      2'd2: return -i;
      default: return -q;
    endcase
  endfunction

  initial begin
    alpha = SIGMA / FS;
    c = $cos(THETA_DEG * PI / 180.0);
    s = $sin(THETA_DEG * PI / 180.0);
    for (int k = 0; k < DELAY; k++) begin dl_gi[k] = 0.0; dl_gq[k] = 0.0; end
    v_i = 0.0; v_q = 0.0;
    adc_cav = '0; adc_fwd = '0; adc_ref = '0;
  end

  // quarter-period counter, kept in step with the FPGA's own
  always @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0;
    else        ph <= ph + 2'd1;

  // The analog world moves on the falling edge, so that everything the FPGA
  // samples on the rising edge is stable.
  always @(negedge clk) if (rst_n) begin
    real fi, fq;
    // the DAC word present now was computed for the previous phase
    case (2'(ph - 2'd1))
      2'd0: g_i = real'(dac_a);
      2'd1: g_q = real'(dac_a);
      2'd2: g_i = -real'(dac_a);
      default: g_q = -real'(dac_a);
    endcase
    // transport delay
    for (int k = DELAY - 1; k > 0; k--) begin
      dl_gi[k] = dl_gi[k-1]; dl_gq[k] = dl_gq[k-1];
    end
    dl_gi[0] = g_i; dl_gq[0] = g_q;
    // cavity
    cav_i = cav_i + alpha * (dl_gi[DELAY-1] - beam_i - cav_i);
    cav_q = cav_q + alpha * (dl_gq[DELAY-1] - beam_q - cav_q);
    v_i = c * cav_i - s * cav_q;
    v_q = s * cav_i + c * cav_q;
    // ADC samples for the phase the FPGA samples on the next rising edge
    fi = c * dl_gi[DELAY-1] - s * dl_gq[DELAY-1];
    fq = s * dl_gi[DELAY-1] + c * dl_gq[DELAY-1];
    adc_cav <= bypass ? adc_force : q14(if_sample(v_i, v_q, ph));
    adc_fwd <= q14(if_sample(fi, fq, ph));
    adc_ref <= q14(if_sample(fi - v_i, fq - v_q, ph));
  end

endmodule
