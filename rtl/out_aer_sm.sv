// OUT-AER state machine of the PCI-AER board (PC memory -> AER bus).
//
// Each 32-bit OFIFO word holds an address in bits [15:0] and, in bits [31:16],
// the time from the previous event in timer ticks (one tick = tpre+1 clocks,
// so a 30 ns clock can be slowed up to 16 times). The machine reads a word,
// waits that time and sends the address with a four-phase handshake. The wait
// is measured against the schedule, not against the actual send time: a
// signed "slack" timer keeps counting down while an ACK is late, and the late
// time is taken off the next wait. If it exceeds that wait, the next event
// goes out at once and the remaining lateness carries over to the one after,
// so a slow ACK does not shift all later events. The word 0xFFFF_FFFF waits
// the longest time (65535 ticks) and sends nothing. With ts_en (ETO) low the
// times are ignored and events go out back to back.
// Choices of this design: the code of the special word, lateness kept to at
// most 65535 ticks, and the timer running only while a word is waiting or a
// handshake is open, or in the clock right after a word was dispatched (an
// empty OFIFO does not build up lateness; the first word after an idle time
// starts a new schedule).
// Timing: a word is taken from the FIFO one clock after the previous one is
// dispatched; REQ rises in the clock after slack reaches zero.
module out_aer_sm
  import aer_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  input  logic [3:0]       tpre,
  input  logic             ts_en,
  output logic             fifo_rd,
  input  logic [31:0]      fifo_dout,
  input  logic             fifo_empty,
  output logic             aer_req,
  output logic [AER_W-1:0] aer_data,
  input  logic             aer_ack
);
  localparam int SW = 18;
  localparam logic signed [SW-1:0] SLACK_MIN = -SW'(65535);

  logic [3:0]            pc;
  logic                  tick;
  logic signed [SW-1:0]  slack;
  logic                  have_word;
  logic [31:0]           word;
  logic                  tx_ready, tx_busy, tx_valid;
  logic                  load, issue, run, issued_q;
  logic [SW-1:0]         delay;

  assign tick  = (pc == tpre);
  assign run   = en && (have_word || tx_busy || issued_q);
  assign load  = en && !have_word && !fifo_empty;
  assign delay = ts_en ? SW'(fifo_dout[31:16]) : '0;
  assign issue = en && have_word && (slack <= 0) && tx_ready;
  assign tx_valid = issue && (word != OUT_WAIT_WORD);
  assign fifo_rd  = load;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      pc        <= '0;
      slack     <= '0;
      issued_q  <= 1'b0;
      have_word <= 1'b0;
      word      <= '0;
    end else begin
      pc <= (tick || !run) ? '0 : pc + 1'b1;
      issued_q <= issue;
      begin
        logic signed [SW-1:0] s;
        s = slack;
        if (load) s = s + $signed(delay);
        if (run && tick && s > SLACK_MIN) s = s - SW'(1);
        slack <= s;
      end
      if (load) begin
        word      <= fifo_dout;
        have_word <= 1'b1;
      end else if (issue) begin
        have_word <= 1'b0;
      end
    end
  end

  aer_tx #(.W(AER_W)) u_tx (
    .clk, .rst, .valid(tx_valid), .data(word[AER_W-1:0]), .ready(tx_ready), .busy(tx_busy),
    .aer_req, .aer_data, .aer_ack
  );
endmodule
