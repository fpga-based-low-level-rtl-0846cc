// iq_lowpass: first-order low-pass filter on an I/Q stream.
//
// The receive paths carry a digital filter after the matrix; its response is
// not specified, so this design uses the simplest low-pass that removes
// sample-to-sample ripple: y += (x - y) / 2^shift, separately on I and Q, with
// 8 extra fractional bits in the state. shift = 0 passes the input straight
// through (registered). With shift = 2 at 40.512 MS/s the -3 dB point is
// about 1.5 MHz, well above the 182 kHz loop crossover.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
module iq_lowpass
  import lrfsc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] shift,     // filter coefficient 2^-shift, 0..8
  input  iq_t        in,
  input  logic       in_valid,
  output iq_t        out,
  output logic       out_valid
);

  localparam int unsigned FR = 8;
  logic signed [IQ_W+FR+1:0] st_i, st_q, nx_i, nx_q, xi, xq;
  logic [3:0] sh;
  localparam logic signed [IQ_W+FR+1:0] RND = 1 <<< (FR - 1);

  always_comb begin
    sh = (shift > 4'd8) ? 4'd8 : shift;
    xi = (IQ_W+FR+2)'(in.i) <<< FR;
    xq = (IQ_W+FR+2)'(in.q) <<< FR;
    nx_i = st_i + ((xi - st_i) >>> sh);
    nx_q = st_q + ((xq - st_q) >>> sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_i      <= '0;
      st_q      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        st_i <= nx_i;
        st_q <= nx_q;
      end
    end
  end

  // round the state to the output width
  always_comb begin
    out.i = sat_iq(48'((st_i + RND) >>> FR));
    out.q = sat_iq(48'((st_q + RND) >>> FR));
  end

endmodule
