// tb_iq_demod: self-checking test of the I/Q demodulator.
// Feeds random ADC samples with a running quarter-period number and checks
// that every output pair is (x0, x1) or (-x2, -x3) of the two samples before
// it, that out_valid comes every second clock, one clock after the Q sample.
module tb_iq_demod;
  import lrfsc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc;
  logic [1:0] phase;
  iq_t out;
  logic out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint exp_i, exp_q;
  logic signed [ADC_W-1:0] hist [4];

  iq_demod dut (.clk, .rst_n, .adc, .phase, .out, .out_valid);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    adc = '0; phase = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check output of the previous edge
      if (n > 2) begin
        checks++;
        if (out_valid !== phase[0]) begin
          failures++; $display("valid cadence wrong at n=%0d", n);
        end
        if (out_valid) begin
          // the sample just taken is Q, the one before it I
          exp_i = hist[2'(phase - 2'd1)];
          exp_q = hist[phase];
          if (phase == 2'd3) begin exp_i = -exp_i; exp_q = -exp_q; end
          checks++;
          if (out.i != exp_i || out.q != exp_q) begin
            failures++; $display("n=%0d got %0d,%0d exp %0d,%0d", n, out.i, out.q, exp_i, exp_q);
          end
        end
      end
      // present next sample
      if (n > 0) phase = phase + 2'd1;
      adc = (n % 97 == 5) ? -14'sd8192 : 14'($urandom);
      hist[phase] = adc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
