// tb_iq_sat_add: self-checking test of the feed-forward adder.
// Random operands with and without b_en, including sums that overflow 16 bits
// in both directions; checks the saturated sum, the sat flag and the
// one-clock latency.
module tb_iq_sat_add;
  import lrfsc_pkg::*;
  logic clk = 0, rst_n = 0, b_en = 0, in_valid = 0;
  iq_t a, b, out;
  logic out_valid, sat;
  int checks = 0, failures = 0, n_sat = 0;

  iq_sat_add dut (.clk, .rst_n, .a, .b, .b_en, .in_valid, .out, .out_valid, .sat);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint clip(longint v, output bit s);
    s = 0;
    if (v > 32767) begin s = 1; return 32767; end
    if (v < -32768) begin s = 1; return -32768; end
    return v;
  endfunction

  initial begin
    longint ei, eq;
    bit si, sq;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a = '{i: iq_word_t'($urandom), q: iq_word_t'($urandom)};
      b = '{i: iq_word_t'($urandom), q: iq_word_t'($urandom)};
      b_en = (n % 3) != 0;
      in_valid = 1;
      ei = clip(longint'(a.i) + (b_en ? longint'(b.i) : 0), si);
      eq = clip(longint'(a.q) + (b_en ? longint'(b.q) : 0), sq);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || out.i != ei || out.q != eq || sat != (si | sq)) begin
        failures++; $display("FAIL got %0d,%0d,%b exp %0d,%0d,%b", out.i, out.q, sat, ei, eq, si | sq);
      end
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
