// Four-phase AER sender.
//
// A word offered with `valid` is taken (`ready` high for that clock) when the
// sender is idle; it is put on the bus and REQ is raised in the same clock
// edge. The sender waits for the synchronised ACK to rise, drops REQ and waits
// for ACK to fall. The clock that sees ACK low can already take the next word,
// so back-to-back events cost 6 clocks against a receiver that answers at
// once (two synchroniser flops plus one state clock per ACK edge). REQ/ACK are active high (polarity is
// not given by the document). `busy` is high from the word being taken until
// the handshake has closed.
module aer_tx #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid,
  input  logic [W-1:0] data,
  output logic         ready,
  output logic         busy,
  output logic         aer_req,
  output logic [W-1:0] aer_data,
  input  logic         aer_ack
);
  typedef enum logic [1:0] {IDLE, WAIT_ACK, WAIT_NACK} st_e;
  st_e  st;
  logic ack_s;
  aer_sync #(.W(1)) u_sync (.clk, .rst, .d(aer_ack), .q(ack_s));

  assign ready = (st == IDLE) || (st == WAIT_NACK && !ack_s);
  assign busy  = (st != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= IDLE;
      aer_req  <= 1'b0;
      aer_data <= '0;
    end else begin
      unique case (st)
        IDLE: if (valid) begin
          aer_data <= data;
          aer_req  <= 1'b1;
          st       <= WAIT_ACK;
        end
        WAIT_ACK: if (ack_s) begin
          aer_req <= 1'b0;
          st      <= WAIT_NACK;
        end
        WAIT_NACK: if (!ack_s) begin
          if (valid) begin
            aer_data <= data;
            aer_req  <= 1'b1;
            st       <= WAIT_ACK;
          end else begin
            st <= IDLE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // Four-phase rules: a new REQ only after ACK has fallen, and the address
  // stays put while REQ is high.
  ap_req_after_nack: assert property (@(posedge clk) disable iff (rst) $rose(aer_req) |-> !ack_s);
  ap_data_stable:    assert property (@(posedge clk) disable iff (rst) aer_req && $past(aer_req) |-> $stable(aer_data));
endmodule
