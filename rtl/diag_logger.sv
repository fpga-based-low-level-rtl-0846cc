// diag_logger: one diagnostic channel (the card has four).
//
// A selector picks one of eight internal I/Q test points. The selected signal
// is (1) logged into a local memory during the RF pulse, for the host to read
// afterwards, and (2) sent, saturated to 14 bits (the ADC scale), to a front-panel dual-channel
// DAC at 40.512 MHz. Logging restarts at address 0 on each pulse start and
// stores one I/Q word every (decim + 1) samples while RF ON is high, until
// the memory is full; count then holds the number of words stored. Selection,
// logging during the pulse and host read-out are the source design's; the
// memory depth, decimation and word format ({I, Q}, 16 bits each) are this
// design's choices.
//
// Timing: test points are sampled on ce40 (they are registered and hold
// their value between strobes). The host read port has one clock of latency.
module diag_logger
  import lrfsc_pkg::*;
#(
  parameter int unsigned LOG_AW = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  iq_t                tp [N_TP],    // test points
  input  logic [2:0]         sel,
  input  logic [15:0]        decim,
  input  logic               ce40,
  input  logic               rfon,
  input  logic               pulse_start,
  input  logic [LOG_AW-1:0]  raddr,        // host read address
  output logic [31:0]        rdata,        // host read data, one clock later
  output logic [LOG_AW:0]    count,        // words logged in the last/current pulse
  output logic signed [DAC_W-1:0] dac_i,   // front-panel DAC, I channel
  output logic signed [DAC_W-1:0] dac_q    // front-panel DAC, Q channel
);

  localparam int unsigned DEPTH = 2**LOG_AW;

  logic [31:0] mem [DEPTH];
  iq_t         s;
  logic [15:0] dcnt;
  logic        full, wr;

  function automatic logic signed [DAC_W-1:0] to_dac(input iq_word_t v);
    if (v > 16'sd8191)       return 14'sd8191;
    else if (v < -16'sd8192) return -14'sd8192;
    else                     return v[DAC_W-1:0];
  endfunction

  always_comb begin
    s    = tp[sel];
    full = (count == (LOG_AW+1)'(DEPTH));
    wr   = ce40 && rfon && !pulse_start && !full && (dcnt == 16'd0);
  end

  always_ff @(posedge clk) begin
    if (wr) mem[count[LOG_AW-1:0]] <= {s.i, s.q};
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      dcnt  <= '0;
      dac_i <= '0;
      dac_q <= '0;
    end else begin
      if (pulse_start) begin
        count <= '0;
        dcnt  <= '0;
      end else if (ce40 && rfon) begin
        if (wr) count <= count + 1'b1;
        dcnt <= (dcnt >= decim) ? 16'd0 : dcnt + 16'd1;
      end
      if (ce40) begin
        dac_i <= to_dac(s.i);
        dac_q <= to_dac(s.q);
      end
    end
  end

endmodule
