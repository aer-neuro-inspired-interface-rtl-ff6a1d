// PCI-AER board back end: connects the PC to an AER system.
//
// Two paths work in parallel. PC -> AER: words written to the FIFO register
// (by the processor or by the PCI core's bus master) enter the OFIFO, and the
// OUT-AER state machine sends each address at the time given in the word.
// AER -> PC: the IN-AER state machine stores each incoming address with the
// time since the previous event in the IFIFO, which is read through the same
// FIFO register. A register decoder, the register file and the interrupt
// logic sit between the PCI core's target back end and these paths. With
// CONFIG.IL set the internal loop connects the OUT-AER bus straight to the
// IN-AER machine for self-test and the external AER buses stay idle.
// The PCI core itself (configuration space, bus mastering, the tri-state
// AD bus) is outside this module: its back-end signals are the ports.
// Clock: the 33 MHz PCI clock (30 ns). Reset: synchronous, active high.
module pci_aer
  import aer_pkg::*;
#(
  parameter int FIFO_DEPTH = 4096
) (
  input  logic             pclk,
  input  logic             rst,
  // target back end of the PCI core
  input  logic [7:0]       base_hit,
  input  logic [31:0]      addr,
  input  logic             s_wrdn,
  input  logic             s_data,
  input  logic [31:0]      adio_in,
  output logic [31:0]      adio_out,
  output logic             inta,
  // bus master of the PCI core
  output logic [6:0]       mst_ctrl,
  output logic [31:0]      mst_addr,
  output logic [31:0]      mst_len,
  input  logic             mst_word,
  input  logic             mst_end,
  // AER input bus
  input  logic             reqi,
  input  logic [AER_W-1:0] datai,
  output logic             acki,
  // AER output bus
  output logic             reqo,
  output logic [AER_W-1:0] datao,
  input  logic             acko
);
  logic [5:0] rd_cs, wr_cs;
  logic       bar1_rd_cs, bar1_wr_cs;
  cfg_t       cfg;
  logic [5:0] int_en;
  logic [FIFO_CW-1:0] li, lo, ti, to;
  logic       int_clr;
  flags_t     flags;

  logic        ofifo_wr, ofifo_rd, ififo_wr, ififo_rd;
  logic [31:0] ofifo_din, ofifo_dout, ififo_din, ififo_dout;
  logic        of_e, of_h, of_f, if_e, if_h, if_f;
  logic        mst_end_q;

  pci_decoder u_dec (
    .base_hit, .addr, .s_wrdn, .s_data, .rd_cs, .wr_cs, .bar1_rd_cs, .bar1_wr_cs
  );

  pciaer_regs u_regs (
    .clk(pclk), .rst, .rd_cs, .wr_cs, .bar1_rd_cs, .bar1_wr_cs, .adio_in, .adio_out,
    .cfg, .int_en, .li, .lo, .int_clr, .flags, .ti, .to,
    .ofifo_wr, .ofifo_din, .ififo_rd, .ififo_dout, .mst_addr, .mst_len, .mst_word
  );

  assign flags = '{of_e: of_e, of_h: of_h, of_f: of_f, if_e: if_e, if_h: if_h, if_f: if_f};
  assign mst_ctrl = cfg.mst;

  irq_ctrl u_irq (
    .clk(pclk), .rst, .flags(flags), .en(int_en), .gie(cfg.gie),
    .mst_end, .mst_mask(cfg.mst[6]), .clr(int_clr), .mst_end_q, .inta
  );

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH), .CW(FIFO_CW)) u_ofifo (
    .clk(pclk), .rst, .clr(cfg.rao), .wr(ofifo_wr), .din(ofifo_din), .rd(ofifo_rd),
    .dout(ofifo_dout), .level(lo), .count(to), .empty(of_e), .half(of_h), .full(of_f)
  );

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH), .CW(FIFO_CW)) u_ififo (
    .clk(pclk), .rst, .clr(cfg.rai), .wr(ififo_wr), .din(ififo_din), .rd(ififo_rd),
    .dout(ififo_dout), .level(li), .count(ti), .empty(if_e), .half(if_h), .full(if_f)
  );

  // Buses between the state machines and the internal loop.
  logic             b_reqo, b_acko, b_reqi, b_acki;
  logic [AER_W-1:0] b_datao, b_datai;

  out_aer_sm u_out (
    .clk(pclk), .rst, .clr(cfg.rao), .en(cfg.eao), .tpre(cfg.tpreo), .ts_en(cfg.eto),
    .fifo_rd(ofifo_rd), .fifo_dout(ofifo_dout), .fifo_empty(of_e),
    .aer_req(b_reqo), .aer_data(b_datao), .aer_ack(b_acko)
  );

  in_aer_sm u_in (
    .clk(pclk), .rst, .clr(cfg.rai), .en(cfg.eai), .tpre(cfg.tprei), .ts_en(cfg.eti),
    .aer_req(b_reqi), .aer_data(b_datai), .aer_ack(b_acki),
    .fifo_wr(ififo_wr), .fifo_din(ififo_din), .fifo_full(if_f)
  );

  // Internal loop.
  always_comb begin
    if (cfg.il) begin
      b_reqi = b_reqo;
      b_datai = b_datao;
      b_acko = b_acki;
      reqo = 1'b0;
      datao = '0;
      acki = 1'b0;
    end else begin
      b_reqi = reqi;
      b_datai = datai;
      b_acko = acko;
      reqo = b_reqo;
      datao = b_datao;
      acki = b_acki;
    end
  end
endmodule
