// lrfsc_top: FPGA part of the Linac RF servo control (LRFSC) card.
//
// The card regulates the amplitude and phase of the RF field in a linac
// cavity by feedback on its I and Q components. Three pick-up signals
// (reflected, forward, cavity), already mixed down to 20.256 MHz, are sampled
// at 81.024 MHz by 14-bit ADCs. Each is demodulated to I/Q at 40.512 MS/s,
// rotated by a programmable 2x2 matrix that cancels cable phase shifts, and
// low-pass filtered. The cavity I/Q is compared with set points played back
// from a table memory during the RF pulse; two PI controllers (I and Q) act on
// the error, feed-forward samples from a second table are added, an output
// matrix rotates the result, and the I/Q modulator turns it into a 20.256 MHz
// staircase sine at 162.048 MS/s (two 14-bit samples per clock) for the DAC.
// Four diagnostic channels select internal signals, log them during the pulse
// and drive front-panel DACs. A host register interface holds all settings
// and raises an interrupt when RF ON falls. The reflected and forward paths
// end at the diagnostics: the resonance control and the amplitude/phase loops
// that would use them are not part of this design.
//
// Clock: one 81.024 MHz clock, active-low asynchronous reset. A cavity I
// sample changes the DAC words 9 clocks (111 ns) after the edge that samples
// it, a Q sample 8 clocks. The source design budgets 222 ns for the FPGA;
// the shorter delay here only adds phase margin. The structure follows the
// source design; widths, the receive filter, the anti-windup method, the
// test-point list and the register map are this design's choices.
module lrfsc_top
  import lrfsc_pkg::*;
#(
  parameter int unsigned SP_AW  = 18,   // table memory address bits (256k words)
  parameter int unsigned LOG_AW = 11    // diagnostic log address bits
) (
  input  logic                    clk,          // 81.024 MHz
  input  logic                    rst_n,
  input  logic                    rf_on,        // RF ON pulse, high during the linac pulse
  input  logic signed [ADC_W-1:0] adc_ref,      // reflected signal ADC
  input  logic signed [ADC_W-1:0] adc_fwd,      // forward signal ADC
  input  logic signed [ADC_W-1:0] adc_cav,      // cavity pick-up ADC
  output logic signed [DAC_W-1:0] dac_a,        // drive DAC, first sample of the clock
  output logic signed [DAC_W-1:0] dac_b,        // drive DAC, second sample of the clock
  input  logic [7:0]              h_addr,       // host bus
  input  logic                    h_wr,
  input  logic [31:0]             h_wdata,
  input  logic                    h_rd,
  output logic [31:0]             h_rdata,
  output logic                    h_rvalid,
  output logic                    irq,          // end-of-pulse interrupt
  output logic signed [DAC_W-1:0] diag_dac_i [N_DIAG],  // front-panel diagnostic DACs
  output logic signed [DAC_W-1:0] diag_dac_q [N_DIAG]
);

  // timing
  logic [1:0]       phase;
  logic             ce40, rfon_s, pulse_start, pulse_end;
  logic [SP_AW-1:0] sample_idx;

  lrfsc_timing #(.IDX_W(SP_AW)) u_timing (
    .clk, .rst_n, .rf_on, .phase, .ce40, .rfon_s, .pulse_start, .pulse_end, .sample_idx
  );

  // settings
  logic        loop_en, sp_en, ff_en;
  mat2_t       m_ref, m_fwd, m_cav, m_out;
  logic [15:0] kp, ki, limit, diag_decim;
  logic [3:0]  filt_shift;
  logic [2:0]  diag_sel [N_DIAG];
  logic [LOG_AW-1:0] diag_raddr;
  logic [31:0]       diag_rdata [N_DIAG];
  logic [LOG_AW:0]   diag_count [N_DIAG];
  logic              sp_we, ff_we;
  logic [SP_AW-1:0]  mem_waddr;
  logic [WF_W-1:0]   mem_wdata;

  host_regs #(.MEM_AW(SP_AW), .LOG_AW(LOG_AW)) u_regs (
    .clk, .rst_n, .h_addr, .h_wr, .h_wdata, .h_rd, .h_rdata, .h_rvalid, .irq,
    .rfon(rfon_s), .pulse_end, .sample_idx,
    .loop_en, .sp_en, .ff_en, .m_ref, .m_fwd, .m_cav, .m_out,
    .kp, .ki, .limit, .filt_shift, .diag_sel, .diag_decim,
    .diag_raddr, .diag_rdata, .diag_count,
    .sp_we, .ff_we, .mem_waddr, .mem_wdata
  );

  // receive paths: demodulator -> matrix -> low-pass
  localparam int unsigned N_RX = 3;  // 0 reflected, 1 forward, 2 cavity
  logic signed [ADC_W-1:0] adc [N_RX];
  mat2_t                   rx_m [N_RX];
  iq_t  dm [N_RX], mx [N_RX], rx [N_RX];
  logic dm_v [N_RX], mx_v [N_RX], rx_v [N_RX];

  assign adc  = '{adc_ref, adc_fwd, adc_cav};
  assign rx_m = '{m_ref, m_fwd, m_cav};

  for (genvar c = 0; c < N_RX; c++) begin : g_rx
    iq_demod u_demod (
      .clk, .rst_n, .adc(adc[c]), .phase, .out(dm[c]), .out_valid(dm_v[c])
    );
    iq_matrix u_mat (
      .clk, .rst_n, .m(rx_m[c]), .in(dm[c]), .in_valid(dm_v[c]),
      .out(mx[c]), .out_valid(mx_v[c])
    );
    iq_lowpass u_lpf (
      .clk, .rst_n, .shift(filt_shift), .in(mx[c]), .in_valid(mx_v[c]),
      .out(rx[c]), .out_valid(rx_v[c])
    );
  end

  // set-point and feed-forward tables, one word per sample during the pulse
  iq_t  sp_raw, ff_raw, sp, ff;

  waveform_ram #(.AW(SP_AW)) u_sp_ram (
    .clk, .rst_n, .we(sp_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rd_en(ce40 && rfon_s), .raddr(sample_idx), .rd_data(sp_raw), .rd_valid()
  );
  waveform_ram #(.AW(SP_AW)) u_ff_ram (
    .clk, .rst_n, .we(ff_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .rd_en(ce40 && rfon_s), .raddr(sample_idx), .rd_data(ff_raw), .rd_valid()
  );

  // outside the pulse both tables contribute zero
  assign sp = (sp_en && rfon_s) ? sp_raw : '0;
  assign ff = rfon_s ? ff_raw : '0;

  // PI controllers for I and Q
  iq_t  pi_out, err;
  logic pi_v;

  pi_controller u_pi_i (
    .clk, .rst_n, .enable(loop_en), .kp, .ki, .limit,
    .sp(sp.i), .meas(rx[2].i), .in_valid(rx_v[2]),
    .err(err.i), .out(pi_out.i), .out_valid(pi_v), .sat_hi(), .sat_lo()
  );
  pi_controller u_pi_q (
    .clk, .rst_n, .enable(loop_en), .kp, .ki, .limit,
    .sp(sp.q), .meas(rx[2].q), .in_valid(rx_v[2]),
    .err(err.q), .out(pi_out.q), .out_valid(), .sat_hi(), .sat_lo()
  );

  // feed-forward injection
  iq_t  drive;
  logic drive_v;

  iq_sat_add u_ff_add (
    .clk, .rst_n, .a(pi_out), .b(ff), .b_en(ff_en), .in_valid(pi_v),
    .out(drive), .out_valid(drive_v), .sat()
  );

  // output matrix and modulator
  iq_t  tx;
  logic tx_v;

  iq_matrix u_out_mat (
    .clk, .rst_n, .m(m_out), .in(drive), .in_valid(drive_v), .out(tx), .out_valid(tx_v)
  );
  iq_modulator u_mod (
    .clk, .rst_n, .in(tx), .in_valid(tx_v), .phase, .dac_a, .dac_b
  );

  // diagnostics
  iq_t tp [N_TP];
  assign tp = '{rx[0], rx[1], rx[2], sp, err, pi_out, drive, tx};

  for (genvar n = 0; n < N_DIAG; n++) begin : g_diag
    diag_logger #(.LOG_AW(LOG_AW)) u_diag (
      .clk, .rst_n, .tp, .sel(diag_sel[n]), .decim(diag_decim), .ce40,
      .rfon(rfon_s), .pulse_start, .raddr(diag_raddr), .rdata(diag_rdata[n]),
      .count(diag_count[n]), .dac_i(diag_dac_i[n]), .dac_q(diag_dac_q[n])
    );
  end

endmodule
