// lrfsc_pkg: types, widths and reset constants shared by the LRFSC cavity
// controller blocks.
//
// The whole FPGA runs on one 81.024 MHz clock (four times the 20.256 MHz
// intermediate frequency). I and Q streams run at 40.512 Msamples/s and are
// carried as a packed struct of two 16-bit two's-complement numbers, with a
// one-cycle valid strobe every second clock. The 14-bit ADC and DAC widths
// and the PI gains follow the source design; the 16-bit internal width, the
// fixed-point scalings and the register map are this design's own choices.
package lrfsc_pkg;

  localparam int unsigned ADC_W   = 14;  // AD6645-class converters, 14 bits
  localparam int unsigned DAC_W   = 14;  // AD9755-class DAC, 14 bits
  localparam int unsigned IQ_W    = 16;  // internal I/Q width
  localparam int unsigned COEF_W  = 16;  // matrix coefficient width
  localparam int unsigned COEF_FRAC = 14;  // matrix coefficients are Q2.14 (1.0 = 16384)
  localparam int unsigned KP_FRAC = 11;  // Kp is Q5.11
  localparam int unsigned KI_FRAC = 20;  // Ki (per 40.512 MHz sample) has 20 fractional bits
  localparam int unsigned N_TP    = 8;   // diagnostic test points
  localparam int unsigned N_DIAG  = 4;   // diagnostic channels
  localparam int unsigned WF_W    = 18;  // set-point / feed-forward memory word (9-bit I, 9-bit Q)

  typedef logic signed [IQ_W-1:0]   iq_word_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef struct packed {
    iq_word_t i;
    iq_word_t q;
  } iq_t;

  // 2x2 matrix [a b; c d] applied as I' = a*I + b*Q, Q' = c*I + d*Q
  typedef struct packed {
    coef_t a;
    coef_t b;
    coef_t c;
    coef_t d;
  } mat2_t;

  localparam coef_t COEF_ONE = coef_t'(16'sd16384);
  localparam mat2_t MAT_IDENTITY = '{a: COEF_ONE, b: '0, c: '0, d: COEF_ONE};

  // Kp = 9.6 and Ki = 1145730 rad/s from the controller design.
  // KP_DEFAULT = round(9.6 * 2^11); KI_DEFAULT = round(1145730 / 40.512e6 * 2^20).
  localparam logic [15:0] KP_DEFAULT    = 16'd19661;
  localparam logic [15:0] KI_DEFAULT    = 16'd29655;
  localparam logic [15:0] LIMIT_DEFAULT = 16'd8191;   // PI output limit, DAC full scale

  // Diagnostic test point numbers
  typedef enum logic [2:0] {
    TP_REF   = 3'd0,  // reflected IQ after matrix and filter
    TP_FWD   = 3'd1,  // forward IQ after matrix and filter
    TP_CAV   = 3'd2,  // cavity IQ after matrix and filter
    TP_SP    = 3'd3,  // set point
    TP_ERR   = 3'd4,  // set point minus cavity
    TP_PI    = 3'd5,  // PI controller output
    TP_DRIVE = 3'd6,  // PI output plus feed-forward
    TP_OUT   = 3'd7   // after the output matrix, into the modulator
  } tp_sel_e;

  // Saturate a wide signed value to IQ_W bits
  function automatic iq_word_t sat_iq(input logic signed [47:0] v);
    if (v > 48'sd32767)       return iq_word_t'(16'sd32767);
    else if (v < -48'sd32768) return iq_word_t'(-16'sd32768);
    else                      return iq_word_t'(v);
  endfunction

endpackage
