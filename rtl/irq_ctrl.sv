// Interrupt logic of the PCI-AER board.
//
// INTA is requested while the global enable GIE is set and either an enabled
// FIFO flag is high (STATUS[5:0] masked by INTERRUPTION[5:0]) or the bus
// master has signalled the end of a transfer and that interrupt is not masked.
// The end-of-transfer pulse is latched until `clr` (a write of the
// INTERRUPTION register); the FIFO flags are level sensitive. Latching,
// clearing and the active-high output are this design's choices. INTA is
// registered: it follows its causes by one clock.
module irq_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] flags,
  input  logic [5:0] en,
  input  logic       gie,
  input  logic       mst_end,
  input  logic       mst_mask,
  input  logic       clr,
  output logic       mst_end_q,
  output logic       inta
);
  always_ff @(posedge clk) begin
    if (rst) begin
      mst_end_q <= 1'b0;
      inta      <= 1'b0;
    end else begin
      if (mst_end)  mst_end_q <= 1'b1;
      else if (clr) mst_end_q <= 1'b0;
      inta <= gie && ((|(flags & en)) || (mst_end_q && !mst_mask));
    end
  end
endmodule
