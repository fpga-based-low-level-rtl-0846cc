// tb_lrfsc_top: end-to-end closed-loop test of the LRFSC FPGA at its default
// sizes, with cavity_model standing in for the converters, RF chain and
// cavity (40 degrees of cable rotation, 38 clocks of transport delay).
//
// Pulse 1 (closed loop): the host loads a set-point table with a step in the
// middle of the pulse, compensates the cable rotation with the cavity-path
// matrix, and runs the loop with the default gains. Checks that the cavity
// follows both set points (measured by the model, independent of the
// design), that the step drives the PI controllers into saturation and they
// recover, that a beam-loading step is corrected, that the diagnostic logs
// hold the set-point table and a small error, and that the interrupt comes
// at the end of the pulse and can be cleared.
// Pulse 2 (open loop): feed-forward table only; checks that the cavity
// settles to the feed-forward value and that a pulse longer than the log
// fills it.
// Finally the loop latency from an ADC sample to the DAC is measured with
// the model bypassed. Each mechanism is counted and must occur. The design
// is observed only through its ports: the diagnostic DAC outputs (cavity,
// error, PI output, set point), the host bus and the drive DAC.
module tb_lrfsc_top;
  import lrfsc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real THETA = 40.0;
  localparam int N1 = 2000;   // samples in pulse 1
  localparam int N2 = 4000;   // samples in pulse 2
  localparam int STEP_AT = 700, BEAM_AT = 1400;

  logic clk = 0, rst_n = 0, rf_on = 0;
  logic signed [13:0] adc_ref, adc_fwd, adc_cav, dac_a, dac_b;
  logic [7:0] h_addr = 0;
  logic h_wr = 0, h_rd = 0, h_rvalid, irq;
  logic [31:0] h_wdata = 0, h_rdata;
  logic signed [13:0] diag_dac_i [N_DIAG], diag_dac_q [N_DIAG];
  logic bypass = 0;
  logic signed [13:0] adc_force = 0;
  real beam_i = 0.0, beam_q = 0.0, v_i, v_q;
  int checks = 0, failures = 0;
  int n_sat = 0, n_spstep = 0, n_beam = 0, n_ff = 0, n_full = 0, n_irq = 0, n_mode = 0, n_rot = 0;
  int cyc = 0;

  lrfsc_top dut (.*);
  cavity_model #(.DELAY(38), .THETA_DEG(THETA)) plant (
    .clk, .rst_n, .dac_a, .bypass, .adc_force, .beam_i, .beam_q,
    .adc_ref, .adc_fwd, .adc_cav, .v_i, .v_q
  );

  always #6 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // diagnostic channel 2 shows the PI output: at +-LIMIT (8191) it is saturated
  function automatic bit pi_sat();
    return diag_dac_i[2] == 14'sd8191 || diag_dac_i[2] == -14'sd8191 ||
           diag_dac_q[2] == 14'sd8191 || diag_dac_q[2] == -14'sd8191;
  endfunction
  always @(posedge clk) if (rst_n && rf_on && pi_sat()) n_sat++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); h_addr = a; h_wdata = d; h_wr = 1;
    @(negedge clk); h_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); h_addr = a; h_rd = 1;
    @(negedge clk); h_rd = 0;
    d = h_rdata;
  endtask

  function automatic logic [17:0] pack(int i9, int q9);
    return {9'(i9), 9'(q9)};
  endfunction

  // set-point table of pulse 1, in 9-bit units (x32 on the 16-bit scale)
  function automatic logic [17:0] sp_word(int n);
    return (n < STEP_AT) ? pack(94, 31) : pack(-60, 80);
  endfunction

  function automatic real mag(real a, real b);
    return $sqrt(a * a + b * b);
  endfunction

  task automatic wait_sample(int n);
    logic [31:0] d;
    do rd(8'h27, d); while (int'(d) < n);
  endtask

  // cavity field against the set point: the model's field is rotated by the
  // cables, so compare amplitude, and the design's measurement for phase
  task automatic check_track(input int i9, input int q9, input real tol, input string what);
    real si, sq, e;
    si = i9 * 32.0; sq = q9 * 32.0;
    e = mag(real'(diag_dac_i[0]) - si, real'(diag_dac_q[0]) - sq);
    chk(e < tol * mag(si, sq), {what, ": measured I/Q off the set point"});
    chk((mag(v_i, v_q) - mag(si, sq)) < tol * mag(si, sq) && (mag(si, sq) - mag(v_i, v_q)) < tol * mag(si, sq),
        {what, ": cavity amplitude off the set point"});
    if (e >= tol * mag(si, sq))
      $display("  measured %0d,%0d set %f,%f |v|=%f", int'(diag_dac_i[0]), int'(diag_dac_q[0]), si, sq, mag(v_i, v_q));
  endtask

  initial begin
    logic [31:0] d;
    real c, s;
    int lat;
    bit seen;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // compensate the cable rotation: cavity matrix = rotation by -THETA
    c = $cos(THETA * PI / 180.0); s = $sin(THETA * PI / 180.0);
    wr(8'h0C, 32'($rtoi(c * 16384.0 + 0.5)));
    wr(8'h0D, 32'($rtoi(s * 16384.0 + 0.5)) & 32'hFFFF);
    wr(8'h0E, 32'(-$rtoi(s * 16384.0 + 0.5)) & 32'hFFFF);
    wr(8'h0F, 32'($rtoi(c * 16384.0 + 0.5)));
    n_rot++;
    // tables
    wr(8'h24, 0);
    for (int n = 0; n < N1 + 8; n++) wr(8'h25, 32'(sp_word(n)));
    wr(8'h24, 0);
    for (int n = 0; n < N2 + 8; n++) wr(8'h26, 32'(pack(47, -22)));
    // diagnostics: cavity, error, PI output, set point
    wr(8'h18, 32'h3542);
    wr(8'h19, 0);
    wr(8'h02, 1);
    // ---------------- pulse 1: closed loop with set-point table
    wr(8'h00, 32'h3); n_mode++;
    @(negedge clk); rf_on = 1;
    wait_sample(STEP_AT - 20);
    check_track(94, 31, 0.03, "first set point");
    chk(n_sat > 0, "pulse start saturates the controllers");
    begin
      int sat0 = n_sat;
      wait_sample(STEP_AT + 10);
      chk(n_sat > sat0, "set-point step saturates the controllers");
      if (n_sat > sat0) n_spstep++;
    end
    wait_sample(BEAM_AT - 20);
    check_track(-60, 80, 0.04, "second set point");
    chk(!pi_sat(), "controller out of saturation after the step");
    @(negedge clk); beam_i = 600.0; beam_q = -300.0;
    wait_sample(BEAM_AT + 10);
    chk(mag(real'(diag_dac_i[1]), real'(diag_dac_q[1])) > 20.0, "beam loading disturbs the field");
    wait_sample(N1 - 20);
    check_track(-60, 80, 0.01, "with beam loading");
    n_beam++;
    wait_sample(N1);
    @(negedge clk); rf_on = 0; beam_i = 0.0; beam_q = 0.0;
    repeat (6) @(negedge clk);
    chk(irq, "interrupt at the end of the pulse");
    if (irq) n_irq++;
    // diagnostics read-back
    for (int ch = 0; ch < 4; ch++) begin
      rd(8'(8'h20 + ch), d);
      chk(d > 32'(N1 - 4) && d <= 32'(N1 + 2), "log count equals pulse length");
    end
    wr(8'h1A, 300);
    rd(8'h1F, d);
    chk(d == {16'(94 * 32), 16'(31 * 32)}, "set-point log before the step");
    wr(8'h1A, 1000);
    rd(8'h1F, d);
    chk(d == {16'(-60 * 32), 16'(80 * 32)}, "set-point log after the step");
    wr(8'h1A, STEP_AT - 30);
    rd(8'h1D, d);
    chk(mag(real'($signed(d[31:16])), real'($signed(d[15:0]))) < 100.0, "logged error small before the step");
    rd(8'h1C, d);
    chk(mag(real'($signed(d[31:16])) - 94 * 32.0, real'($signed(d[15:0])) - 31 * 32.0) < 100.0, "logged cavity I/Q");
    wr(8'h01, 2);
    chk(!irq, "interrupt cleared");
    // ---------------- pulse 2: open loop, feed-forward only
    wr(8'h00, 32'h4); n_mode++;
    @(negedge clk); rf_on = 1;
    wait_sample(N2 - 10);
    chk(diag_dac_i[2] == 0 && diag_dac_q[2] == 0, "controllers off in open loop");
    check_track(47, -22, 0.015, "feed-forward only");
    n_ff++;
    @(negedge clk); rf_on = 0;
    repeat (6) @(negedge clk);
    rd(8'h20, d);
    chk(d == 32'd2048, "log stops when full");
    if (d == 32'd2048) n_full++;
    wr(8'h01, 2);
    // ---------------- latency: ADC sample to DAC, proportional path only
    wr(8'h15, 0);      // Ki = 0
    wr(8'h17, 0);      // no filtering
    wr(8'h00, 0); wr(8'h00, 1);
    bypass = 1; adc_force = 0;
    repeat (40) @(negedge clk);
    chk(dac_a == 0 && dac_b == 0, "output idle with zero input");
    while (plant.ph != 2'd0) @(negedge clk);
    // from here, present a cavity signal with I = -300 (sampled at the next edge)
    lat = 0; seen = 0;
    for (int k = 0; k < 30 && !seen; k++) begin
      case (plant.ph)
        2'd0: adc_force = -14'sd300;
        2'd2: adc_force = 14'sd300;
        default: adc_force = 0;
      endcase
      @(negedge clk);
      lat++;
      if (dac_a != 0 || dac_b != 0) seen = 1;
    end
    // lat counts falling edges from the one before the sampling edge, so the
    // DAC word changes on the 9th rising edge after the one that sampled I
    $display("ADC-to-DAC latency: %0d clocks", lat - 1);
    chk(seen && lat - 1 == 9, "ADC-to-DAC latency of 9 clocks");
    bypass = 0;
    // every mechanism must have happened
    chk(n_sat > 0, "PI saturation / anti-windup");
    chk(n_spstep > 0, "set-point step from the table");
    chk(n_beam > 0, "beam-loading correction");
    chk(n_ff > 0, "feed-forward injection");
    chk(n_full > 0, "diagnostic log full");
    chk(n_irq > 0, "end-of-pulse interrupt");
    chk(n_mode == 2, "closed-loop / open-loop switch");
    chk(n_rot > 0, "cable rotation compensated");
    $display("mechanisms: saturated clocks=%0d set-point steps=%0d beam=%0d ff=%0d full=%0d irq=%0d modes=%0d rot=%0d",
             n_sat, n_spstep, n_beam, n_ff, n_full, n_irq, n_mode, n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
