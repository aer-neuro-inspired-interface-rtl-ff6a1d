// Four-phase AER receiver.
//
// REQ is synchronised (two flops). When REQ is seen high, the receiver is idle
// and `ready` is high, the address on the bus is captured, `valid` pulses for
// one clock with it, and ACK is raised. ACK drops once REQ has been seen low,
// which completes the handshake. The document names the REQ/ACK lines but not
// their polarity: both are active high here. The sender must hold the address
// stable from REQ rising until ACK rises, as the AER protocol requires.
// Latency: `valid` two clocks after REQ rises (plus waiting for `ready`).
module aer_rx #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         aer_req,
  input  logic [W-1:0] aer_data,
  output logic         aer_ack,
  input  logic         ready,
  output logic         valid,
  output logic [W-1:0] data
);
  logic req_s;
  aer_sync #(.W(1)) u_sync (.clk, .rst, .d(aer_req), .q(req_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      aer_ack <= 1'b0;
      valid   <= 1'b0;
      data    <= '0;
    end else begin
      valid <= 1'b0;
      if (!aer_ack && req_s && ready) begin
        data    <= aer_data;
        valid   <= 1'b1;
        aer_ack <= 1'b1;
      end else if (aer_ack && !req_s) begin
        aer_ack <= 1'b0;
      end
    end
  end

  // ACK rises only for a pending REQ and falls only after REQ has fallen.
  ap_ack_rise: assert property (@(posedge clk) disable iff (rst) $rose(aer_ack) |-> $past(req_s));
  ap_ack_fall: assert property (@(posedge clk) disable iff (rst) $fell(aer_ack) |-> !$past(req_s));
endmodule
