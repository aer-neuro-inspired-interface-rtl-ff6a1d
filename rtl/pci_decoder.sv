// Register decoder of the PCI-AER board.
//
// Turns a target data phase of the PCI core's back end into one read or one
// write chip select. BAR0 holds six 32-bit registers at offsets 0x00, 0x04,
// 0x08, 0x0C, 0x10 and 0x14 (bit i of rd_cs/wr_cs = offset 4*i); BAR1 has a
// single select of its own. base_hit[0] flags BAR0, base_hit[1] BAR1,
// s_wrdn = 1 means write, s_data marks the data phase (the usual meaning of
// these core signals; the document only names them). Purely combinational.
module pci_decoder (
  input  logic [7:0]  base_hit,
  input  logic [31:0] addr,
  input  logic        s_wrdn,
  input  logic        s_data,
  output logic [5:0]  rd_cs,
  output logic [5:0]  wr_cs,
  output logic        bar1_rd_cs,
  output logic        bar1_wr_cs
);
  logic [2:0] off;
  assign off = addr[4:2];

  always_comb begin
    rd_cs = '0;
    wr_cs = '0;
    if (s_data && base_hit[0] && off <= 3'd5) begin
      if (s_wrdn) wr_cs[off] = 1'b1;
      else        rd_cs[off] = 1'b1;
    end
  end
  assign bar1_rd_cs = s_data && base_hit[1] && !s_wrdn;
  assign bar1_wr_cs = s_data && base_hit[1] &&  s_wrdn;
endmodule
