// DATout: output process of the AER-Robot interface.
//
// Collects the reply words of the 16 motor processes and 4 sensor processes
// and sends them one per handshake on the output AER bus. Each clock at most
// one source is granted, the lowest-numbered one that is offering a word
// (fixed priority, this design's choice), and its word goes into a FIFO of
// DEPTH entries that feeds the four-phase sender. `almost_full` is raised
// while fewer than 4 entries are free; CMDin then stops accepting commands, so
// a burst of replies cannot overflow the FIFO.
module dat_out
  import aer_pkg::*;
#(
  parameter int N_SRC = 20,
  parameter int DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N_SRC-1:0]       src_valid,
  input  logic [N_SRC-1:0][AER_W-1:0] src_word,
  output logic [N_SRC-1:0]       src_ready,
  output logic                   almost_full,
  output logic                   aer_req,
  output logic [AER_W-1:0]       aer_data,
  input  logic                   aer_ack
);
  localparam int AW = $clog2(DEPTH);
  logic [AER_W-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             full, empty;
  assign full        = (cnt == (AW+1)'(DEPTH));
  assign empty       = (cnt == '0);
  assign almost_full = (cnt >= (AW+1)'(DEPTH - 4));

  // Fixed-priority grant.
  logic [N_SRC-1:0] grant;
  logic [AER_W-1:0] gword;
  always_comb begin
    grant = '0;
    gword = '0;
    if (!full) begin
      for (int i = N_SRC - 1; i >= 0; i--) begin
        if (src_valid[i]) begin
          grant = '0;
          grant[i] = 1'b1;
          gword = src_word[i];
        end
      end
    end
  end
  assign src_ready = grant;

  logic push, pop, tx_ready;
  assign push = |grant;
  assign pop  = !empty && tx_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      if (push && !pop)      cnt <= cnt + 1'b1;
      else if (pop && !push) cnt <= cnt - 1'b1;
    end
  end
  always_ff @(posedge clk) if (push) mem[wp] <= gword;

  logic tx_busy;
  aer_tx #(.W(AER_W)) u_tx (
    .clk, .rst, .valid(!empty), .data(mem[rp]), .ready(tx_ready), .busy(tx_busy),
    .aer_req, .aer_data, .aer_ack
  );

  ap_no_overflow: assert property (@(posedge clk) disable iff (rst) !(full && push));
endmodule
