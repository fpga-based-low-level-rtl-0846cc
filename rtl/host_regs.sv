// host_regs: host (VME) register file and end-of-pulse interrupt.
//
// The real-time task on the VME master configures the card and, after each
// pulse, reads the diagnostics. This block is the register side of that
// interface on a simple synchronous bus (one write or read per clock, read
// data one clock later); the VME protocol engine in front of it is not part
// of this design. On the falling edge of RF ON an interrupt is latched and
// drives irq while enabled, until the host writes 1 to STATUS bit 1 (source
// design: the card interrupts the host at the end of the pulse so that it can
// read diagnostics and change settings). The register map, reset values and
// the rule that the set-point and feed-forward tables are written only while
// RF ON is low are this design's choices.
//
// Word address map (addr):
//   0x00 CTRL      [0] loop enable  [1] set-point enable  [2] feed-forward enable
//   0x01 STATUS    R: [0] RF ON  [1] interrupt pending.  W: 1 to bit 1 clears
//   0x02 IRQ_EN    [0]
//   0x04-0x07      reflected path matrix a, b, c, d (Q2.14)
//   0x08-0x0B      forward path matrix
//   0x0C-0x0F      cavity path matrix
//   0x10-0x13      output matrix
//   0x14 KP (Q5.11)   0x15 KI (2^-20 / sample)   0x16 LIMIT   0x17 FILT_SHIFT
//   0x18 DIAG_SEL  3 bits per channel at [4n+2:4n]
//   0x19 DIAG_DECIM
//   0x1A DIAG_ADDR    read address for all diagnostic logs
//   0x1C-0x1F DIAG_DATA ch0..3 (R) {I, Q} at DIAG_ADDR
//   0x20-0x23 DIAG_COUNT ch0..3 (R)
//   0x24 MEM_ADDR  table address; 0x25 SP_DATA, 0x26 FF_DATA (W, 18 bits,
//                  write at MEM_ADDR, then MEM_ADDR increments)
//   0x27 SAMPLE_IDX (R) samples since the start of the pulse
module host_regs
  import lrfsc_pkg::*;
#(
  parameter int unsigned MEM_AW = 18,
  parameter int unsigned LOG_AW = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [7:0]         h_addr,
  input  logic               h_wr,
  input  logic [31:0]        h_wdata,
  input  logic               h_rd,
  output logic [31:0]        h_rdata,
  output logic               h_rvalid,
  output logic               irq,
  // pulse status
  input  logic               rfon,
  input  logic               pulse_end,
  input  logic [MEM_AW-1:0]  sample_idx,
  // settings
  output logic               loop_en,
  output logic               sp_en,
  output logic               ff_en,
  output mat2_t              m_ref,
  output mat2_t              m_fwd,
  output mat2_t              m_cav,
  output mat2_t              m_out,
  output logic [15:0]        kp,
  output logic [15:0]        ki,
  output logic [15:0]        limit,
  output logic [3:0]         filt_shift,
  output logic [2:0]         diag_sel [N_DIAG],
  output logic [15:0]        diag_decim,
  // diagnostic logs
  output logic [LOG_AW-1:0]  diag_raddr,
  input  logic [31:0]        diag_rdata [N_DIAG],
  input  logic [LOG_AW:0]    diag_count [N_DIAG],
  // table memories
  output logic               sp_we,
  output logic               ff_we,
  output logic [MEM_AW-1:0]  mem_waddr,
  output logic [WF_W-1:0]    mem_wdata
);

  logic [MEM_AW-1:0] mem_addr;
  logic              irq_pend, irq_en;
  logic              tab_wr;

  function automatic mat2_t set_coef(input mat2_t m, input logic [1:0] k, input logic [15:0] v);
    mat2_t r;
    r = m;
    case (k)
      2'd0: r.a = coef_t'(v);
      2'd1: r.b = coef_t'(v);
      2'd2: r.c = coef_t'(v);
      default: r.d = coef_t'(v);
    endcase
    return r;
  endfunction

  function automatic logic [15:0] get_coef(input mat2_t m, input logic [1:0] k);
    case (k)
      2'd0: return m.a;
      2'd1: return m.b;
      2'd2: return m.c;
      default: return m.d;
    endcase
  endfunction

  logic [31:0] sel_word;
  always_comb begin
    sel_word = '0;
    for (int n = 0; n < N_DIAG; n++) sel_word[4*n +: 3] = diag_sel[n];
  end

  assign tab_wr = h_wr && !rfon && (h_addr == 8'h25 || h_addr == 8'h26);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_en    <= 1'b0;
      sp_en      <= 1'b0;
      ff_en      <= 1'b0;
      irq_en     <= 1'b0;
      irq_pend   <= 1'b0;
      m_ref      <= MAT_IDENTITY;
      m_fwd      <= MAT_IDENTITY;
      m_cav      <= MAT_IDENTITY;
      m_out      <= MAT_IDENTITY;
      kp         <= KP_DEFAULT;
      ki         <= KI_DEFAULT;
      limit      <= LIMIT_DEFAULT;
      filt_shift <= 4'd2;
      diag_sel   <= '{default: '0};
      diag_decim <= '0;
      diag_raddr <= '0;
      mem_addr   <= '0;
      sp_we      <= 1'b0;
      ff_we      <= 1'b0;
      mem_waddr  <= '0;
      mem_wdata  <= '0;
      h_rdata    <= '0;
      h_rvalid   <= 1'b0;
    end else begin
      sp_we    <= 1'b0;
      ff_we    <= 1'b0;
      h_rvalid <= h_rd;
      if (pulse_end) irq_pend <= 1'b1;
      if (h_wr) begin
        unique casez (h_addr)
          8'h00: {ff_en, sp_en, loop_en} <= h_wdata[2:0];
          8'h01: if (h_wdata[1] && !pulse_end) irq_pend <= 1'b0;
          8'h02: irq_en <= h_wdata[0];
          8'b0000_01??: m_ref <= set_coef(m_ref, h_addr[1:0], h_wdata[15:0]);
          8'b0000_10??: m_fwd <= set_coef(m_fwd, h_addr[1:0], h_wdata[15:0]);
          8'b0000_11??: m_cav <= set_coef(m_cav, h_addr[1:0], h_wdata[15:0]);
          8'b0001_00??: m_out <= set_coef(m_out, h_addr[1:0], h_wdata[15:0]);
          8'h14: kp <= h_wdata[15:0];
          8'h15: ki <= h_wdata[15:0];
          8'h16: limit <= h_wdata[15:0];
          8'h17: filt_shift <= h_wdata[3:0];
          8'h18: for (int n = 0; n < N_DIAG; n++) diag_sel[n] <= h_wdata[4*n +: 3];
          8'h19: diag_decim <= h_wdata[15:0];
          8'h1A: diag_raddr <= h_wdata[LOG_AW-1:0];
          8'h24: mem_addr <= h_wdata[MEM_AW-1:0];
          default: ;
        endcase
      end
      if (tab_wr) begin
        sp_we     <= (h_addr == 8'h25);
        ff_we     <= (h_addr == 8'h26);
        mem_waddr <= mem_addr;
        mem_wdata <= h_wdata[WF_W-1:0];
        mem_addr  <= mem_addr + 1'b1;
      end
      if (h_rd) begin
        unique casez (h_addr)
          8'h00: h_rdata <= {29'd0, ff_en, sp_en, loop_en};
          8'h01: h_rdata <= {30'd0, irq_pend, rfon};
          8'h02: h_rdata <= {31'd0, irq_en};
          8'b0000_01??: h_rdata <= {16'd0, get_coef(m_ref, h_addr[1:0])};
          8'b0000_10??: h_rdata <= {16'd0, get_coef(m_fwd, h_addr[1:0])};
          8'b0000_11??: h_rdata <= {16'd0, get_coef(m_cav, h_addr[1:0])};
          8'b0001_00??: h_rdata <= {16'd0, get_coef(m_out, h_addr[1:0])};
          8'h14: h_rdata <= {16'd0, kp};
          8'h15: h_rdata <= {16'd0, ki};
          8'h16: h_rdata <= {16'd0, limit};
          8'h17: h_rdata <= {28'd0, filt_shift};
          8'h18: h_rdata <= sel_word;
          8'h19: h_rdata <= {16'd0, diag_decim};
          8'h1A: h_rdata <= 32'(diag_raddr);
          8'b0001_11??: h_rdata <= diag_rdata[h_addr[1:0]];
          8'b0010_00??: h_rdata <= 32'(diag_count[h_addr[1:0]]);
          8'h24: h_rdata <= 32'(mem_addr);
          8'h27: h_rdata <= 32'(sample_idx);
          default: h_rdata <= '0;
        endcase
      end
    end
  end

  assign irq = irq_pend & irq_en;

  // a bus cycle is either a read or a write
  assert property (@(posedge clk) disable iff (!rst_n) !(h_wr && h_rd));

endmodule
