// IN-AER state machine of the PCI-AER board (AER bus -> PC memory).
//
// Accepts events from the input AER bus with a four-phase handshake and
// writes one 32-bit IFIFO word per event: the 16-bit address in [15:0] and,
// in [31:16], the number of timer ticks since the previous event (one tick =
// tpre+1 clocks). With ts_en (ETI) low the time field is zero. The time
// saturates at 0xFFFF, and no event is acknowledged while the IFIFO is full;
// both are choices of this design. Timing: the word is written two clocks
// after REQ rises (synchroniser), ACK rises in the same clock.
module in_aer_sm
  import aer_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  input  logic [3:0]       tpre,
  input  logic             ts_en,
  input  logic             aer_req,
  input  logic [AER_W-1:0] aer_data,
  output logic             aer_ack,
  output logic             fifo_wr,
  output logic [31:0]      fifo_din,
  input  logic             fifo_full
);
  logic             rx_valid;
  logic [AER_W-1:0] rx_data;
  logic [3:0]       pc;
  logic             tick;
  logic [15:0]      tdiff;

  aer_rx #(.W(AER_W)) u_rx (
    .clk, .rst, .aer_req, .aer_data, .aer_ack,
    .ready(en && !clr && !fifo_full), .valid(rx_valid), .data(rx_data)
  );

  assign tick = (pc == tpre);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      pc    <= '0;
      tdiff <= '0;
    end else if (en) begin
      pc <= tick ? '0 : pc + 1'b1;
      if (rx_valid)                   tdiff <= tick ? 16'd1 : 16'd0;
      else if (tick && tdiff != '1)   tdiff <= tdiff + 1'b1;
    end
  end

  assign fifo_wr  = rx_valid;
  assign fifo_din = {ts_en ? tdiff : 16'd0, rx_data};
endmodule
