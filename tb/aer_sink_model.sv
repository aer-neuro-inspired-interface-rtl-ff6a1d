// Behavioural AER receiver for testbenches. On REQ it waits a random
// min_dly..max_dly clocks (MIN_DLY..MAX_DLY at start, changeable), stores the address in `q` with its arrival cycle in
// `t`, raises ACK, waits for REQ to fall and drops ACK. `data_changed` counts
// data changes seen while REQ was high (a protocol error). It starts
// listening 8 clocks after time zero, when the testbenches have left reset.
module aer_sink_model #(
  parameter int MIN_DLY = 0,
  parameter int MAX_DLY = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic [15:0] data,
  output logic        ack
);
  logic [15:0] q [$];
  longint t [$];
  longint cyc = 0;
  int data_changed = 0;
  logic [15:0] last;
  logic        req_q = 1'b0;
  int          dly = 0;
  int          min_dly = MIN_DLY, max_dly = MAX_DLY;
  initial ack = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    req_q <= req;
    if (cyc > 8 && req && req_q && data != last) data_changed++;
    last <= data;
  end
  initial begin
    // listen only once the device under test is out of reset
    repeat (8) @(posedge clk);
    forever begin
      @(posedge clk);
      if (req) begin
        q.push_back(data);
        t.push_back(cyc);
        dly = $urandom_range(max_dly, min_dly);
        repeat (dly) @(posedge clk);
        ack <= 1'b1;
        while (req) @(posedge clk);
        ack <= 1'b0;
      end
    end
  end
endmodule
