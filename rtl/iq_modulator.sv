// iq_modulator: digital I/Q modulator producing the 20.256 MHz drive signal.
//
// The DAC runs at 162.048 MS/s, eight samples per IF period. Sample k of a
// period is y(k) = I*cos(2*pi*k/8) + Q*sin(2*pi*k/8), which the source design
// produces by stepping through sine and cosine lookup tables; the result is a
// staircase sine whose amplitude and phase are set by I and Q. Here the FPGA
// clock is 81.024 MHz, so each clock produces two DAC samples, k = 2*phase and
// 2*phase + 1 (dac_a first, then dac_b), as fed to a dual-port DAC that
// interleaves its two inputs. The phase input is the same quarter-period
// counter the demodulators use, so transmit and receive share one reference.
// Table values are round(16384 * sin(2*pi*k/8)). Output is two's complement,
// rounded and saturated to 14 bits.
//
// Timing: I/Q is captured on the clock edge where in_valid is high; the DAC
// pair computed for a phase value is registered on the following edge, so a
// new I/Q reaches the DAC outputs two clocks after its in_valid.
module iq_modulator
  import lrfsc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  iq_t                     in,
  input  logic                    in_valid,
  input  logic [1:0]              phase,
  output logic signed [DAC_W-1:0] dac_a,   // sample k = 2*phase
  output logic signed [DAC_W-1:0] dac_b    // sample k = 2*phase + 1
);

  // sin(2*pi*k/8) in Q1.14
  function automatic logic signed [15:0] sin8(input logic [2:0] k);
    case (k)
      3'd0:    return 16'sd0;
      3'd1:    return 16'sd11585;
      3'd2:    return 16'sd16384;
      3'd3:    return 16'sd11585;
      3'd4:    return 16'sd0;
      3'd5:    return -16'sd11585;
      3'd6:    return -16'sd16384;
      default: return -16'sd11585;
    endcase
  endfunction

  // cos(x) = sin(x + pi/2): two table steps ahead
  function automatic logic signed [15:0] cos8(input logic [2:0] k);
    return sin8(k + 3'd2);
  endfunction

  function automatic logic signed [DAC_W-1:0] sat_dac(input logic signed [47:0] v);
    if (v > 48'sd8191)       return 14'sd8191;
    else if (v < -48'sd8192) return -14'sd8192;
    else                     return v[DAC_W-1:0];
  endfunction

  iq_t                hold;
  logic [2:0]         k0, k1;
  logic signed [47:0] ci0, sq0, ci1, sq1, y0, y1;

  always_comb begin
    k0  = {phase, 1'b0};
    k1  = {phase, 1'b1};
    ci0 = hold.i * cos8(k0);
    sq0 = hold.q * sin8(k0);
    ci1 = hold.i * cos8(k1);
    sq1 = hold.q * sin8(k1);
    y0  = (ci0 + sq0 + 48'sd8192) >>> 14;
    y1  = (ci1 + sq1 + 48'sd8192) >>> 14;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold  <= '0;
      dac_a <= '0;
      dac_b <= '0;
    end else begin
      if (in_valid) hold <= in;
      dac_a <= sat_dac(y0);
      dac_b <= sat_dac(y1);
    end
  end

endmodule
