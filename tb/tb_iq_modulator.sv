// tb_iq_modulator: self-checking test of the I/Q modulator.
// For random I/Q pairs, checks every DAC sample of a full IF period against
// I*cos(2*pi*k/8) + Q*sin(2*pi*k/8) computed in floating point (within one
// LSB for the table rounding), the saturation at 14 bits, and the two-clock
// latency from in_valid to the DAC outputs.
module tb_iq_modulator;
  import lrfsc_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] phase = 0;
  iq_t in;
  logic signed [13:0] dac_a, dac_b;
  int checks = 0, failures = 0;

  iq_modulator dut (.clk, .rst_n, .in, .in_valid, .phase, .dac_a, .dac_b);

  always #5 clk = ~clk;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  always @(posedge clk) phase <= phase + 2'd1;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real expect_k(iq_t x, int k);
    real y;
    y = real'(x.i) * $cos(2.0 * PI * k / 8.0) + real'(x.q) * $sin(2.0 * PI * k / 8.0);
    if (y > 8191.0) y = 8191.0;
    if (y < -8192.0) y = -8192.0;
    return y;
  endfunction

  initial begin
    iq_t x;
    logic [1:0] p;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      x = '{i: iq_word_t'($signed(14'($urandom))), q: iq_word_t'($signed(14'($urandom)))};
      if (n % 5 == 0) x = '{i: iq_word_t'($signed(13'($urandom))), q: iq_word_t'($signed(12'($urandom)))};
      @(negedge clk); in = x; in_valid = 1;
      @(negedge clk); in_valid = 0;
      // one clock later the pair for the phase now presented is registered
      for (int c = 0; c < 4; c++) begin
        p = phase;
        @(negedge clk);
        checks += 2;
        if (absr(real'(dac_a) - expect_k(x, 2 * p)) > 1.01 ||
            absr(real'(dac_b) - expect_k(x, 2 * p + 1)) > 1.01) begin
          failures++;
          $display("FAIL I=%0d Q=%0d phase %0d got %0d %0d exp %f %f", x.i, x.q, p, dac_a, dac_b,
                   expect_k(x, 2 * p), expect_k(x, 2 * p + 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
