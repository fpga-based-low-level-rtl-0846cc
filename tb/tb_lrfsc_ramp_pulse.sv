// tb_lrfsc_ramp_pulse: one full-length ramped pulse at the default sizes.
//
// The set-point table is filled to its full 6.4 ms (259,277 samples at
// 40.512 MS/s). It holds a linear amplitude ramp at constant phase, as used
// to ramp the beam energy during the pulse. The loop runs closed against
// cavity_model for the whole pulse, with the logs decimated by 128 so that one
// log covers the pulse. Checks:
//   - the cavity follows the ramp (measured on diagnostic channel 0 and as
//     the model's field amplitude) at 25 points along the pulse
//   - the sample index reaches the pulse length
//   - the set-point log matches the table along the pulse
//   - the log count is the pulse length / 128
//   - the interrupt at the end
module tb_lrfsc_ramp_pulse;
  import lrfsc_pkg::*;
  localparam int NS = 259277;       // 6.4 ms * 40.512 MS/s
  localparam int DEC = 128;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, rf_on = 0;
  logic signed [13:0] adc_ref, adc_fwd, adc_cav, dac_a, dac_b;
  logic [7:0] h_addr = 0;
  logic h_wr = 0, h_rd = 0, h_rvalid, irq;
  logic [31:0] h_wdata = 0, h_rdata;
  logic signed [13:0] diag_dac_i [N_DIAG], diag_dac_q [N_DIAG];
  real v_i, v_q;
  int checks = 0, failures = 0;

  lrfsc_top dut (.*);
  cavity_model #(.DELAY(38), .THETA_DEG(-25.0)) plant (
    .clk, .rst_n, .dac_a, .bypass(1'b0), .adc_force(14'sd0), .beam_i(0.0), .beam_q(0.0),
    .adc_ref, .adc_fwd, .adc_cav, .v_i, .v_q
  );

  always #6 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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

  // amplitude ramp 64 -> 100 (9-bit units) over the pulse, Q = I / 2
  function automatic int ramp_i(int n);
    return 64 + (36 * n) / NS;
  endfunction
  function automatic int ramp_q(int n);
    return ramp_i(n) / 2;
  endfunction

  function automatic real mag(real a, real b);
    return $sqrt(a * a + b * b);
  endfunction

  initial begin
    logic [31:0] d;
    real c, s, si, sq;
    int n_ok;
    repeat (4) @(negedge clk);
    rst_n = 1;
    c = $cos(-25.0 * PI / 180.0); s = $sin(-25.0 * PI / 180.0);
    wr(8'h0C, 32'($rtoi(c * 16384.0 + 0.5)) & 32'hFFFF);
    wr(8'h0D, 32'($rtoi(s * 16384.0 - 0.5)) & 32'hFFFF);
    wr(8'h0E, 32'(-$rtoi(s * 16384.0 - 0.5)) & 32'hFFFF);
    wr(8'h0F, 32'($rtoi(c * 16384.0 + 0.5)) & 32'hFFFF);
    wr(8'h24, 0);
    for (int n = 0; n < 2**18; n++) wr(8'h25, 32'({9'(ramp_i(n)), 9'(ramp_q(n))}));
    rd(8'h24, d);
    chk(d == 0, "table address wrapped after 256k words");
    wr(8'h18, 32'h3542);   // cavity, error, PI output, set point
    wr(8'h19, DEC - 1);
    wr(8'h02, 1);
    wr(8'h00, 3);
    @(negedge clk); rf_on = 1;
    for (int k = 1; k <= 25; k++) begin
      do rd(8'h27, d); while (int'(d) < k * (NS / 26));
      si = ramp_i(int'(d)) * 32.0; sq = ramp_q(int'(d)) * 32.0;
      chk(mag(real'(diag_dac_i[0]) - si, real'(diag_dac_q[0]) - sq) < 0.02 * mag(si, sq),
          "measured cavity I/Q follows the ramp");
      chk((mag(v_i, v_q) - mag(si, sq)) < 0.02 * mag(si, sq) && (mag(si, sq) - mag(v_i, v_q)) < 0.02 * mag(si, sq),
          "cavity amplitude follows the ramp");
    end
    do rd(8'h27, d); while (int'(d) < NS);
    @(negedge clk); rf_on = 0;
    repeat (6) @(negedge clk);
    rd(8'h27, d);
    chk(d >= NS && d <= NS + 2, "pulse of 6.4 ms of samples");
    chk(irq, "interrupt at the end of the pulse");
    rd(8'h23, d);
    chk(d >= (NS - 4) / DEC && d <= NS / DEC + 2, "log covers the pulse");
    // set-point log against the table: word k holds the sample near k * DEC
    n_ok = 0;
    for (int k = 0; k < 2000; k += 37) begin
      logic [31:0] e0, e1;
      wr(8'h1A, k);
      rd(8'h1F, d);
      e0 = {16'(ramp_i(k * DEC) * 32), 16'(ramp_q(k * DEC) * 32)};
      e1 = {16'(ramp_i(k * DEC + 1) * 32), 16'(ramp_q(k * DEC + 1) * 32)};
      chk(d == e0 || d == e1, "set-point log matches the table");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
