// tb_iq_matrix: self-checking test of the 2x2 matrix multiplier.
// Random coefficients and inputs, including full-scale values that saturate;
// the expected result is computed in 64-bit arithmetic with round-to-nearest.
// Also checks a 90-degree rotation and the one-clock latency.
module tb_iq_matrix;
  import lrfsc_pkg::*;
  logic clk = 0, rst_n = 0;
  mat2_t m;
  iq_t in, out;
  logic in_valid, out_valid;
  int checks = 0, failures = 0;

  iq_matrix dut (.clk, .rst_n, .m, .in, .in_valid, .out, .out_valid);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint ref_val(longint x);
    longint r;
    r = x + 8192;
    r = (r >= 0) ? r / 16384 : -((-r + 16383) / 16384);  // floor division
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic apply(input mat2_t mm, input iq_t x);
    longint ei, eq;
    @(negedge clk);
    m = mm; in = x; in_valid = 1;
    ei = ref_val(longint'(mm.a) * x.i + longint'(mm.b) * x.q);
    eq = ref_val(longint'(mm.c) * x.i + longint'(mm.d) * x.q);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out.i != ei || out.q != eq) begin
      failures++;
      $display("FAIL m=%0d %0d %0d %0d in=%0d,%0d got %0d,%0d exp %0d,%0d", mm.a, mm.b, mm.c, mm.d,
               x.i, x.q, out.i, out.q, ei, eq);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    mat2_t mm;
    iq_t x;
    m = MAT_IDENTITY; in = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identity and 90-degree rotation
    apply(MAT_IDENTITY, '{i: 1234, q: -567});
    apply('{a: 0, b: -16384, c: 16384, d: 0}, '{i: 1000, q: 300});
    checks++;
    if (out.i != -300 || out.q != 1000) begin failures++; $display("FAIL rotation"); end
    for (int n = 0; n < 3000; n++) begin
      mm = '{a: coef_t'($urandom), b: coef_t'($urandom), c: coef_t'($urandom), d: coef_t'($urandom)};
      x  = '{i: iq_word_t'($urandom), q: iq_word_t'($urandom)};
      if (n % 4 == 0) x = '{i: iq_word_t'($signed(14'($urandom))), q: iq_word_t'($signed(14'($urandom)))};
      apply(mm, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
