// iq_matrix: programmable 2x2 I/Q matrix multiplier.
//
// Computes I' = a*I + b*Q and Q' = c*I + d*Q with Q2.14 coefficients
// (16384 = 1.0), rounding to nearest and saturating to 16 bits. Loaded with a
// rotation matrix it undoes the phase shift of cables outside the card, so
// that I sent out comes back as I rather than as a mix of I and Q (source
// design). The fixed-point format and rounding are this design's choices.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
module iq_matrix
  import lrfsc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mat2_t m,
  input  iq_t   in,
  input  logic  in_valid,
  output iq_t   out,
  output logic  out_valid
);

  logic signed [47:0] pa, pb, pc, pd, acc_i, acc_q;
  localparam logic signed [47:0] HALF = 48'sd1 <<< (COEF_FRAC - 1);

  always_comb begin
    pa = m.a * in.i;
    pb = m.b * in.q;
    pc = m.c * in.i;
    pd = m.d * in.q;
    acc_i = pa + pb + HALF;
    acc_q = pc + pd + HALF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out.i <= sat_iq(acc_i >>> COEF_FRAC);
        out.q <= sat_iq(acc_q >>> COEF_FRAC);
      end
    end
  end

endmodule
