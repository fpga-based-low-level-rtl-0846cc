// tb_lrfsc_timing: self-checking test of the phase counter, the 40.512 MHz
// strobe, RF ON edge detection (two-clock synchroniser) and the in-pulse
// sample index, over two pulses of different lengths.
module tb_lrfsc_timing;
  logic clk = 0, rst_n = 0, rf_on = 0;
  logic [1:0] phase;
  logic ce40, rfon_s, pulse_start, pulse_end;
  logic [7:0] sample_idx;
  int checks = 0, failures = 0;
  int cyc = 0, t_rise, n_ce, starts = 0, ends = 0;
  logic [1:0] last_phase;

  lrfsc_timing #(.IDX_W(8)) dut (.clk, .rst_n, .rf_on, .phase, .ce40, .rfon_s,
                                 .pulse_start, .pulse_end, .sample_idx);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // free-running checks
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cyc > 1) chk(phase == 2'(last_phase + 2'd1), "phase increments");
    chk(ce40 == phase[0], "ce40 on odd phases");
    last_phase = phase;
    if (pulse_start) starts++;
    if (pulse_end) ends++;
  end

  task automatic pulse(input int len, input int pre);
    int idx_exp;
    repeat (pre) @(negedge clk);
    rf_on = 1; t_rise = 0;
    // wait until the pulse is seen: two clocks of synchroniser
    do begin @(negedge clk); t_rise++; end while (!pulse_start && t_rise < 10);
    chk(t_rise == 2, "pulse_start two clocks after RF ON rise");
    chk(rfon_s, "rfon_s high at start");
    n_ce = 0;
    @(posedge clk); @(negedge clk);
    chk(sample_idx == 0, "index restarts at 0");
    for (int k = 0; k < len; k++) begin
      @(posedge clk);
      if (ce40 && rfon_s) n_ce++;
      @(negedge clk);
      idx_exp = (n_ce > 255) ? 255 : n_ce;
      chk(sample_idx == 8'(idx_exp), "index counts 40.512 MHz samples");
    end
    rf_on = 0;
    repeat (4) @(negedge clk);
    chk(!rfon_s, "rfon_s low after pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    pulse(100, 7);
    pulse(700, 10);  // long enough for the index to stop at its maximum
    chk(sample_idx == 8'd255, "index saturates");
    chk(starts == 2 && ends == 2, "two pulse starts and two pulse ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
