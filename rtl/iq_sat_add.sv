// iq_sat_add: feed-forward injection after the PI controllers.
//
// out = a + (b_en ? b : 0), separately on I and Q, saturated to 16 bits.
// In the loop, a is the PI controller output and b the feed-forward table
// sample played back during the pulse (source design: feed-forward data is
// injected after the PI controller); saturation instead of wrap-around is
// this design's choice.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
// b is sampled whenever in_valid is high, so it only needs to be held stable
// at the 40.512 MHz rate.
module iq_sat_add
  import lrfsc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  iq_t  a,
  input  iq_t  b,
  input  logic b_en,
  input  logic in_valid,
  output iq_t  out,
  output logic out_valid,
  output logic sat            // the last sum was saturated
);

  logic signed [47:0] si, sq;

  always_comb begin
    si = 48'(a.i) + (b_en ? 48'(b.i) : 48'sd0);
    sq = 48'(a.q) + (b_en ? 48'(b.q) : 48'sd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
      sat       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out.i <= sat_iq(si);
        out.q <= sat_iq(sq);
        sat   <= (si != 48'(sat_iq(si))) || (sq != 48'(sat_iq(sq)));
      end
    end
  end

endmodule
