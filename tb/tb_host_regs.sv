// tb_host_regs: self-checking test of the host register file.
// Checks reset values (identity matrices, Kp = 9.6, Ki, limit), write and
// read-back of every setting register, the one-clock read latency, the
// indirect table writes with address auto-increment, that table writes are
// ignored during the RF pulse, diagnostic read-back, and the end-of-pulse
// interrupt: set by pulse_end, masked by IRQ_EN, cleared by writing 1.
module tb_host_regs;
  import lrfsc_pkg::*;
  localparam int MEM_AW = 10, LOG_AW = 6;
  logic clk = 0, rst_n = 0;
  logic [7:0] h_addr = 0;
  logic h_wr = 0, h_rd = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic h_rvalid, irq;
  logic rfon = 0, pulse_end = 0;
  logic [MEM_AW-1:0] sample_idx = 10'd77;
  logic loop_en, sp_en, ff_en;
  mat2_t m_ref, m_fwd, m_cav, m_out;
  logic [15:0] kp, ki, limit, diag_decim;
  logic [3:0] filt_shift;
  logic [2:0] diag_sel [N_DIAG];
  logic [LOG_AW-1:0] diag_raddr;
  logic [31:0] diag_rdata [N_DIAG];
  logic [LOG_AW:0] diag_count [N_DIAG];
  logic sp_we, ff_we;
  logic [MEM_AW-1:0] mem_waddr;
  logic [17:0] mem_wdata;
  int checks = 0, failures = 0;
  int n_sp = 0, n_ff = 0;
  logic [17:0] sp_mem [2**MEM_AW];

  host_regs #(.MEM_AW(MEM_AW), .LOG_AW(LOG_AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // diagnostic logs: data depends on channel and address
  always_comb for (int n = 0; n < N_DIAG; n++) begin
    diag_rdata[n] = 32'h1000_0000 * n + 32'(diag_raddr);
    diag_count[n] = (LOG_AW+1)'(n + 3);
  end

  always @(posedge clk) begin
    if (rst_n && sp_we) begin n_sp++; sp_mem[mem_waddr] <= mem_wdata; end
    if (rst_n && ff_we) n_ff++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); h_addr = a; h_wdata = d; h_wr = 1;
    @(negedge clk); h_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); h_addr = a; h_rd = 1;
    @(negedge clk); h_rd = 0;
    checks++;
    if (!h_rvalid) begin failures++; $display("FAIL no rvalid"); end
    d = h_rdata;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d != e) begin failures++; $display("FAIL read %h got %h exp %h", a, d, e); end
  endtask

  initial begin
    logic [31:0] v [64];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    expect_rd(8'h04, 32'd16384); expect_rd(8'h05, 0); expect_rd(8'h06, 0); expect_rd(8'h07, 32'd16384);
    expect_rd(8'h13, 32'd16384);
    expect_rd(8'h14, 32'd19661); expect_rd(8'h15, 32'd29655); expect_rd(8'h16, 32'd8191);
    expect_rd(8'h00, 0);
    checks++;
    if (m_cav != MAT_IDENTITY || kp != 16'd19661) begin failures++; $display("FAIL reset outputs"); end
    // settings write and read back
    for (int a = 4; a < 20; a++) begin v[a] = 32'($urandom) & 32'hFFFF; wr(8'(a), v[a]); end
    for (int a = 4; a < 20; a++) expect_rd(8'(a), v[a]);
    checks++;
    if (m_ref.b != coef_t'(v[5]) || m_fwd.c != coef_t'(v[10]) || m_cav.d != coef_t'(v[15]) || m_out.a != coef_t'(v[16])) begin
      failures++; $display("FAIL matrix outputs");
    end
    wr(8'h00, 32'h7); expect_rd(8'h00, 32'h7);
    checks++;
    if (!(loop_en && sp_en && ff_en)) begin failures++; $display("FAIL ctrl"); end
    wr(8'h14, 32'h1234); wr(8'h15, 32'h0042); wr(8'h16, 32'h0777); wr(8'h17, 32'h3);
    expect_rd(8'h14, 32'h1234); expect_rd(8'h17, 32'h3);
    wr(8'h18, 32'h5361); expect_rd(8'h18, 32'h5361);
    checks++;
    if (diag_sel[0] != 3'd1 || diag_sel[1] != 3'd6 || diag_sel[2] != 3'd3 || diag_sel[3] != 3'd5) begin
      failures++; $display("FAIL diag_sel");
    end
    wr(8'h19, 32'd9); expect_rd(8'h19, 32'd9);
    // diagnostic read-back
    wr(8'h1A, 32'd21);
    for (int n = 0; n < N_DIAG; n++) begin
      expect_rd(8'(8'h1C + n), 32'h1000_0000 * n + 21);
      expect_rd(8'(8'h20 + n), 32'(n + 3));
    end
    expect_rd(8'h27, 32'd77);
    // table writes with auto-increment
    wr(8'h24, 32'd100);
    for (int k = 0; k < 10; k++) wr(8'h25, 32'(k * 1111));
    expect_rd(8'h24, 32'd110);
    wr(8'h24, 32'd500);
    for (int k = 0; k < 5; k++) wr(8'h26, 32'(k));
    @(negedge clk);
    checks++;
    if (n_sp != 10 || n_ff != 5) begin failures++; $display("FAIL table writes %0d %0d", n_sp, n_ff); end
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (sp_mem[100 + k] != 18'(k * 1111)) begin failures++; $display("FAIL sp word %0d", k); end
    end
    // no table writes during the pulse
    rfon = 1;
    wr(8'h25, 32'h3FFFF);
    expect_rd(8'h01, 32'h1);
    @(negedge clk);
    checks++;
    if (n_sp != 10) begin failures++; $display("FAIL table written during pulse"); end
    // interrupt
    checks++;
    if (irq) begin failures++; $display("FAIL irq early"); end
    @(negedge clk); rfon = 0; pulse_end = 1;
    @(negedge clk); pulse_end = 0;
    expect_rd(8'h01, 32'h2);
    checks++;
    if (irq) begin failures++; $display("FAIL irq not masked"); end
    wr(8'h02, 32'h1);
    checks++;
    if (!irq) begin failures++; $display("FAIL irq not raised"); end
    wr(8'h01, 32'h2);
    checks++;
    if (irq) begin failures++; $display("FAIL irq not cleared"); end
    expect_rd(8'h01, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
