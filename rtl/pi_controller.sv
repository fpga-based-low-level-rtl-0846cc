// pi_controller: one proportional-integral controller (one each for I and Q).
//
// u[n] = Kp*e[n] + S[n],  S[n+1] = S[n] + Ki*e[n],  e = set point - measured.
// The integrator uses the rectangular rule, as in the source design; Kp is
// Q5.11 and Ki is the integral gain per 40.512 MHz sample with 20 fractional
// bits (Ki = KI_rad_s / 40.512e6). The defaults Kp = 9.6 and
// KI = 1145730 rad/s put the controller zero on the cavity pole
// (sigma = 119380 rad/s) and give 45 degrees of phase margin for the loop
// delay of the source design.
//
// The output is limited to +-limit. Anti-windup (the scheme is this design's
// choice): while the output is at a limit the integrator does not integrate an
// error that would push further into that limit, and the integrator itself is
// clamped to +-limit, so control becomes linear again as soon as the error
// reverses after a large set-point step. With enable low the integrator is
// cleared and the output is zero.
//
// Timing: two register stages; out_valid follows in_valid by two clocks.
// sat_hi / sat_lo flag a limited output alongside out.
module pi_controller
  import lrfsc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] kp,        // Q5.11
  input  logic [15:0] ki,        // 2^-20 units per sample
  input  logic [15:0] limit,     // positive output limit
  input  iq_word_t    sp,        // set point
  input  iq_word_t    meas,      // measured value
  input  logic        in_valid,
  output iq_word_t    err,       // registered error, for diagnostics
  output iq_word_t    out,
  output logic        out_valid,
  output logic        sat_hi,
  output logic        sat_lo
);

  localparam int unsigned AW = 48;  // integrator width, KI_FRAC fractional bits

  logic signed [16:0]   e_r;
  logic                 v1;
  logic signed [AW-1:0] integ;      // S[n], KI_FRAC fractional bits
  logic signed [AW-1:0] p_term, i_step, u_raw, lim, lim_f, integ_nx;
  logic                 hi, lo;

  always_comb begin
    lim    = AW'($signed({1'b0, limit}));
    lim_f  = lim <<< KI_FRAC;
    p_term = (AW'(e_r) * AW'($signed({1'b0, kp}))) >>> KP_FRAC;
    i_step = AW'(e_r) * AW'($signed({1'b0, ki}));
    u_raw  = p_term + (integ >>> KI_FRAC);
    hi     = u_raw > lim;
    lo     = u_raw < -lim;
    // conditional integration
    if ((hi && e_r > 0) || (lo && e_r < 0)) integ_nx = integ;
    else                                    integ_nx = integ + i_step;
    if (integ_nx > lim_f)       integ_nx = lim_f;
    else if (integ_nx < -lim_f) integ_nx = -lim_f;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_r       <= '0;
      v1        <= 1'b0;
      integ     <= '0;
      out       <= '0;
      out_valid <= 1'b0;
      sat_hi    <= 1'b0;
      sat_lo    <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) e_r <= 17'(sp) - 17'(meas);
      if (!enable) begin
        integ  <= '0;
        out    <= '0;
        sat_hi <= 1'b0;
        sat_lo <= 1'b0;
      end else if (v1) begin
        integ  <= integ_nx;
        sat_hi <= hi;
        sat_lo <= lo;
        if (hi)      out <= iq_word_t'(lim);
        else if (lo) out <= iq_word_t'(-lim);
        else         out <= iq_word_t'(u_raw);
      end
    end
  end

  assign err = sat_iq(48'(e_r));

endmodule
