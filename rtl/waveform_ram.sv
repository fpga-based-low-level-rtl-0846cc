// waveform_ram: set-point / feed-forward table memory.
//
// One 18-bit word per 40.512 MHz sample holds a 9-bit I and a 9-bit Q value
// ({I, Q}, two's complement). 256k words cover about 6.4 ms of pulse. The
// host fills the table between pulses through the write port; during the
// pulse the table is read at the sample index and each 9-bit value is
// scaled by 2^SCALE_SH onto the 16-bit I/Q scale (SCALE_SH = 5 maps the 9-bit
// range onto the 14-bit ADC range). The size and the 18-bit width are the
// source design's (an external 18x256k SRAM); packing I and Q into one word
// and the scaling are this design's reading of "6.4 ms of full IQ data".
//
// Timing: synchronous read, rd_data/rd_valid one clock after rd_en. Write
// and read are separate ports.
module waveform_ram
  import lrfsc_pkg::*;
#(
  parameter int unsigned AW       = 18,
  parameter int unsigned SCALE_SH = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WF_W-1:0]   wdata,
  input  logic              rd_en,
  input  logic [AW-1:0]     raddr,
  output iq_t               rd_data,
  output logic              rd_valid
);

  logic [WF_W-1:0] mem [2**AW];
  logic [WF_W-1:0] q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) q <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

  always_comb begin
    rd_data.i = iq_word_t'($signed(q[17:9])) <<< SCALE_SH;
    rd_data.q = iq_word_t'($signed(q[8:0])) <<< SCALE_SH;
  end

endmodule
