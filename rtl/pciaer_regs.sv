// Register file of the PCI-AER board (BAR0 and BAR1 target space).
//
//   0x00 CONFIG        R/W  cfg_t (aer_pkg)
//   0x04 STATUS        R    {TO[12:0], TI[12:0], OFE, OFH, OFF, IFE, IFH, IFF}
//        MST BURST LEN W    burst length for the PCI core's bus master
//   0x08 INTERRUPTION  R/W  {LO[12:0], LI[12:0], interrupt enables [5:0]}
//   0x0C FIFO ACCESS   R/W  read pops the IFIFO, write pushes the OFIFO
//   0x10 MEM ADDRESS   R/W  memory address for bus-master transfers
//   0x14 WORD COUNTER  R    words moved by the bus master (cleared by a write of 0x10)
//   BAR1               R/W  same as FIFO ACCESS
// The register names and field widths follow the board's register map; the
// bit positions, the BAR1 use and the counter clearing are this design's
// choices. Reads are combinational from the chip selects (data returned in the
// same data phase); writes take effect at the clock edge. A write of the
// INTERRUPTION register also clears a latched end-of-transfer interrupt.
module pciaer_regs
  import aer_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [5:0]         rd_cs,
  input  logic [5:0]         wr_cs,
  input  logic               bar1_rd_cs,
  input  logic               bar1_wr_cs,
  input  logic [31:0]        adio_in,
  output logic [31:0]        adio_out,
  output cfg_t               cfg,
  output logic [5:0]         int_en,
  output logic [FIFO_CW-1:0] li,
  output logic [FIFO_CW-1:0] lo,
  output logic               int_clr,
  input  flags_t             flags,
  input  logic [FIFO_CW-1:0] ti,
  input  logic [FIFO_CW-1:0] to,
  output logic               ofifo_wr,
  output logic [31:0]        ofifo_din,
  output logic               ififo_rd,
  input  logic [31:0]        ififo_dout,
  output logic [31:0]        mst_addr,
  output logic [31:0]        mst_len,
  input  logic               mst_word
);
  logic [31:0] word_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg      <= '0;
      int_en   <= '0;
      li       <= FIFO_CW'(2048);
      lo       <= FIFO_CW'(2048);
      mst_addr <= '0;
      mst_len  <= '0;
      word_cnt <= '0;
    end else begin
      if (wr_cs[0]) cfg <= cfg_t'({7'd0, adio_in[24:0]});
      if (wr_cs[1]) mst_len <= adio_in;
      if (wr_cs[2]) {lo, li, int_en} <= adio_in;
      if (wr_cs[4]) mst_addr <= adio_in;
      if (wr_cs[4])      word_cnt <= '0;
      else if (mst_word) word_cnt <= word_cnt + 1'b1;
    end
  end

  assign int_clr   = wr_cs[2];
  assign ofifo_wr  = wr_cs[3] || bar1_wr_cs;
  assign ofifo_din = adio_in;
  assign ififo_rd  = rd_cs[3] || bar1_rd_cs;

  always_comb begin
    adio_out = '0;
    unique0 case (1'b1)
      rd_cs[0]:               adio_out = cfg;
      rd_cs[1]:               adio_out = {to, ti, flags};
      rd_cs[2]:               adio_out = {lo, li, int_en};
      rd_cs[3], bar1_rd_cs:   adio_out = ififo_dout;
      rd_cs[4]:               adio_out = mst_addr;
      rd_cs[5]:               adio_out = word_cnt;
      default:                adio_out = '0;
    endcase
  end
endmodule
