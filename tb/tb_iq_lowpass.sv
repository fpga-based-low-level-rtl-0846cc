// tb_iq_lowpass: self-checking test of the first-order I/Q low-pass.
// Checks pass-through with shift 0, the step response against the
// closed form y[n] = x * (1 - (1 - 2^-s)^n) within one LSB of rounding drift,
// and that the state only moves on in_valid.
module tb_iq_lowpass;
  import lrfsc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] shift;
  iq_t in, out;
  logic in_valid, out_valid;
  int checks = 0, failures = 0;

  iq_lowpass dut (.clk, .rst_n, .shift, .in, .in_valid, .out, .out_valid);

  always #5 clk = ~clk;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input iq_t x);
    @(negedge clk); in = x; in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no valid"); end
  endtask

  initial begin
    real a, yi, yq;
    shift = 0; in = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pass-through
    for (int n = 0; n < 50; n++) begin
      iq_t x;
      x = '{i: iq_word_t'($urandom), q: iq_word_t'($urandom)};
      step(x);
      checks++;
      if (out != x) begin failures++; $display("FAIL pass-through"); end
    end
    // step responses for several shifts
    for (int s = 1; s <= 4; s++) begin
      // settle at zero
      shift = 0; step('0);
      shift = 4'(s);
      a = 1.0 - 1.0 / real'(1 << s);
      yi = 0.0; yq = 0.0;
      for (int n = 1; n <= 80; n++) begin
        step('{i: 16'sd6000, q: -16'sd3000});
        yi = 6000.0 * (1.0 - a ** n);
        yq = -3000.0 * (1.0 - a ** n);
        checks++;
        if (absr(real'(out.i) - yi) > 1.5 || absr(real'(out.q) - yq) > 1.5) begin
          failures++; $display("FAIL s=%0d n=%0d got %0d,%0d exp %f,%f", s, n, out.i, out.q, yi, yq);
        end
      end
      // output must not move without in_valid
      begin
        iq_t held;
        held = out;
        in = '0;
        repeat (5) @(negedge clk);
        checks++;
        if (out != held) begin failures++; $display("FAIL output moved without in_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
