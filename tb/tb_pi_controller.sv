// tb_pi_controller: self-checking test of one PI controller.
// A reference model in the testbench (u = Kp*e + S, S += Ki*e, output limit,
// conditional integration, integrator clamp) is run on random set points and
// measurements with the default gains Kp = 9.6, Ki = 1145730 rad/s at
// 40.512 MS/s, and on a large set-point step that drives the output into the
// limit. Checks the two-clock latency, the outputs, the saturation flags,
// that anti-windup lets the output leave the limit on the first sample after
// the error reverses, and that enable low clears the controller.
module tb_pi_controller;
  import lrfsc_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, in_valid = 0;
  logic [15:0] kp = 16'd19661, ki = 16'd29655, limit = 16'd8191;
  iq_word_t sp, meas, err, out;
  logic out_valid, sat_hi, sat_lo;
  int checks = 0, failures = 0;
  longint S = 0;   // model integrator, 2^-20 units
  longint u_exp;
  bit hi_exp, lo_exp;
  int n_sat = 0;

  pi_controller dut (.clk, .rst_n, .enable, .kp, .ki, .limit, .sp, .meas, .in_valid,
                     .err, .out, .out_valid, .sat_hi, .sat_lo);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint fl(longint x, int sh);  // floor(x / 2^sh)
    return (x >= 0) ? x / (64'sd1 << sh) : -((-x + (64'sd1 << sh) - 1) / (64'sd1 << sh));
  endfunction

  task automatic model(input longint e);
    longint p, u, lim, S2;
    lim = limit;
    p = fl(e * kp, 11);
    u = p + fl(S, 20);
    hi_exp = u > lim; lo_exp = u < -lim;
    if ((hi_exp && e > 0) || (lo_exp && e < 0)) S2 = S; else S2 = S + e * ki;
    if (S2 > (lim <<< 20)) S2 = lim <<< 20;
    if (S2 < -(lim <<< 20)) S2 = -(lim <<< 20);
    S = S2;
    u_exp = hi_exp ? lim : (lo_exp ? -lim : u);
  endtask

  task automatic sample(input iq_word_t s, input iq_word_t m);
    @(negedge clk); sp = s; meas = m; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid too early"); end
    @(negedge clk);
    model(longint'(s) - longint'(m));
    checks++;
    if (!out_valid || out != u_exp || sat_hi != hi_exp || sat_lo != lo_exp || err != s - m) begin
      failures++;
      $display("FAIL sp=%0d meas=%0d got %0d (%b%b) exp %0d (%b%b)", s, m, out, sat_hi, sat_lo,
               u_exp, hi_exp, lo_exp);
    end
    if (sat_hi || sat_lo) n_sat++;
  endtask

  initial begin
    int first_lin;
    sp = 0; meas = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    // small random errors: linear region
    for (int n = 0; n < 300; n++) sample(iq_word_t'($signed(10'($urandom))), iq_word_t'($signed(10'($urandom))));
    // large step: output saturates; then the error reverses
    for (int n = 0; n < 200; n++) sample(16'sd6000, 16'sd0);
    checks++;
    if (!sat_hi) begin failures++; $display("FAIL no saturation on step"); end
    sample(16'sd0, 16'sd200);   // small negative error
    checks++;
    if (sat_hi || out >= 16'sd8191) begin failures++; $display("FAIL wind-up: output still at the limit"); end
    // random including large values
    for (int n = 0; n < 2000; n++) sample(iq_word_t'($signed(14'($urandom))), iq_word_t'($signed(14'($urandom))));
    // other limits and gains
    limit = 16'd3000; kp = 16'd4096; ki = 16'd60000;
    for (int n = 0; n < 1000; n++) sample(iq_word_t'($signed(13'($urandom))), iq_word_t'($signed(13'($urandom))));
    // disable clears the controller
    @(negedge clk); enable = 0;
    @(negedge clk); @(negedge clk); enable = 1; S = 0;
    checks++;
    if (out != 0) begin failures++; $display("FAIL disable does not clear"); end
    sample(16'sd100, 16'sd0);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
