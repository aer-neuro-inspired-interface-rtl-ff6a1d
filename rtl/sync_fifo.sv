// IFIFO / OFIFO of the PCI-AER board: single-clock first-word-fall-through FIFO.
//
// `dout` shows the oldest word while `empty` is low; `rd` pops it. `wr` pushes
// `din` unless the FIFO is full (a write to a full FIFO is dropped, a read
// of an empty one ignored). `count` is the number of words held (TI/TO in
// the STATUS register), `half` is high while count >= `level` (LI/LO in the
// INTERRUPTION register), `clr` empties the FIFO in one clock. The depth is
// this design's choice, matched to the 13-bit word counts of the register map.
module sync_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 4096,
  parameter int CW    = $clog2(DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          wr,
  input  logic [W-1:0]  din,
  input  logic          rd,
  output logic [W-1:0]  dout,
  input  logic [CW-1:0] level,
  output logic [CW-1:0] count,
  output logic          empty,
  output logic          half,
  output logic          full
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign half  = (count >= level);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) if (do_wr) mem[wp] <= din;
endmodule
