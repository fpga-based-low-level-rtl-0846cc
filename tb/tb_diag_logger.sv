// tb_diag_logger: self-checking test of one diagnostic channel.
// Eight test points change on every 40.512 MHz strobe. Three pulses are run
// with different selections and decimations; the testbench keeps its own
// list of the values it expects to be logged and reads the memory back
// through the host port (one clock latency). Checks the stored words, the
// count, the stop when the memory is full, and the front-panel DAC values
// (selected signal saturated to 14 bits).
module tb_diag_logger;
  import lrfsc_pkg::*;
  localparam int LOG_AW = 5;
  localparam int DEPTH = 2**LOG_AW;
  logic clk = 0, rst_n = 0;
  iq_t tp [N_TP];
  logic [2:0] sel;
  logic [15:0] decim;
  logic ce40 = 0, rfon = 0, pulse_start = 0;
  logic [LOG_AW-1:0] raddr;
  logic [31:0] rdata;
  logic [LOG_AW:0] count;
  logic signed [13:0] dac_i, dac_q;
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  int t = 0;

  diag_logger #(.LOG_AW(LOG_AW)) dut (.clk, .rst_n, .tp, .sel, .decim, .ce40, .rfon, .pulse_start,
                                      .raddr, .rdata, .count, .dac_i, .dac_q);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic signed [13:0] sat14(iq_word_t v);
    if (v > 8191) return 14'sd8191;
    if (v < -8192) return -14'sd8192;
    return 14'(v);
  endfunction

  task automatic set_tp();
    for (int k = 0; k < N_TP; k++)
      tp[k] = '{i: iq_word_t'(k * 1500 + t), q: iq_word_t'(-(k * 1100) - 3 * t)};
  endtask

  // run a pulse of len 40.512 MHz samples
  task automatic pulse(input logic [2:0] s, input logic [15:0] d, input int len);
    int j = 0;
    sel = s; decim = d;
    expq.delete();
    for (int n = 0; n < 2 * len + 2; n++) begin
      @(negedge clk);
      ce40 = ~ce40;
      if (ce40) begin t++; set_tp(); end
      pulse_start = (n == 0);
      rfon = (n < 2 * len);
      // model of what gets written at the coming edge
      if (ce40 && rfon && !pulse_start) begin
        if (j % (int'(d) + 1) == 0 && expq.size() < DEPTH) expq.push_back({tp[s].i, tp[s].q});
        j++;
      end
      if (ce40) begin
        @(negedge clk);
        ce40 = 0;
        checks++;
        if (dac_i != sat14(tp[s].i) || dac_q != sat14(tp[s].q)) begin
          failures++; $display("FAIL dac %0d %0d", dac_i, dac_q);
        end
        n++;
      end
    end
    rfon = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (int'(count) != expq.size()) begin failures++; $display("FAIL count %0d exp %0d", count, expq.size()); end
    for (int a = 0; a < expq.size(); a++) begin
      @(negedge clk); raddr = LOG_AW'(a);
      @(negedge clk);
      checks++;
      if (rdata != expq[a]) begin failures++; $display("FAIL log[%0d] %h exp %h", a, rdata, expq[a]); end
    end
  endtask

  initial begin
    t = 0; set_tp(); sel = 0; decim = 0; raddr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulse(3'd3, 16'd0, 20);
    pulse(3'd6, 16'd2, 120);   // fills the memory
    checks++;
    if (count != (LOG_AW+1)'(DEPTH)) begin failures++; $display("FAIL not full"); end
    pulse(3'd7, 16'd1, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
