// tb_waveform_ram: self-checking test of the set-point / feed-forward table.
// Writes random 18-bit words, then reads them back in order and at random
// addresses, checking the one-clock read latency and the unpacking of the
// 9-bit I (upper) and Q (lower) fields scaled by 2^5.
module tb_waveform_ram;
  import lrfsc_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic we, rd_en, rd_valid;
  logic [AW-1:0] waddr, raddr;
  logic [17:0] wdata;
  iq_t rd_data;
  logic [17:0] model [2**AW];
  int checks = 0, failures = 0;

  waveform_ram #(.AW(AW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .rd_en, .raddr, .rd_data, .rd_valid);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic rd(input logic [AW-1:0] a);
    int ei, eq;
    @(negedge clk); rd_en = 1; raddr = a;
    @(negedge clk); rd_en = 0;
    ei = int'($signed(model[a][17:9])) * 32;
    eq = int'($signed(model[a][8:0])) * 32;
    checks++;
    if (!rd_valid || rd_data.i != ei || rd_data.q != eq) begin
      failures++; $display("FAIL addr %0d got %0d,%0d exp %0d,%0d", a, rd_data.i, rd_data.q, ei, eq);
    end
  endtask

  initial begin
    we = 0; rd_en = 0; waddr = '0; raddr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2**AW; n++) begin
      @(negedge clk); we = 1; waddr = AW'(n); wdata = 18'($urandom);
      if (n == 3) wdata = {9'h100, 9'h0FF};  // most negative I, most positive Q
      model[n] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2**AW; n++) rd(AW'(n));
    for (int n = 0; n < 500; n++) rd(AW'($urandom));
    checks++;
    rd(AW'(3));
    if (rd_data.i != -8192 || rd_data.q != 8160) begin failures++; $display("FAIL extremes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
