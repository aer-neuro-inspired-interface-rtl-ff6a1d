// Behavioural AER sender for testbenches. Words pushed into `q` are sent one
// per four-phase handshake (active-high REQ/ACK). Between handshakes it waits
// a random 0..GAP clocks. `sent` counts completed handshakes; `req_rise` holds
// the cycle count at the last REQ rise (cycle counter `cyc`).
module aer_src_model #(
  parameter int GAP = 3
) (
  input  logic        clk,
  output logic        req,
  output logic [15:0] data,
  input  logic        ack
);
  logic [15:0] q [$];
  int sent = 0;
  longint cyc = 0;
  initial begin
    req = 1'b0;
    data = '0;
  end
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    forever begin
      @(posedge clk);
      if (q.size() > 0) begin
        data <= q.pop_front();
        @(posedge clk);
        req <= 1'b1;
        while (!ack) @(posedge clk);
        req <= 1'b0;
        while (ack) @(posedge clk);
        sent++;
        repeat ($urandom_range(GAP)) @(posedge clk);
      end
    end
  end
endmodule
