// Testbench of aer_tx: offers random words back to back or with gaps to a
// behavioural receiver with random ACK delay; checks every word arrives once,
// in order, with the address stable while REQ is high. It then measures one
// handshake, and the event rate of a back-to-back burst against a receiver
// that answers each REQ edge one clock after it sees it.
module tb_aer_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic valid = 0, ready, busy, req, ack;
  logic [15:0] data = 0, bus;
  aer_tx #(.W(16)) dut (.clk, .rst, .valid, .data, .ready, .busy, .aer_req(req), .aer_data(bus), .aer_ack(ack));
  aer_sink_model #(.MIN_DLY(0), .MAX_DLY(4)) sink (.clk, .req, .data(bus), .ack);

  logic [15:0] sent [$];
  // protocol monitor: REQ may rise only while ACK is low
  int proto_err = 0;
  logic req_q = 0;
  always @(posedge clk) begin
    req_q <= req;
    if (!rst && req && !req_q && ack) proto_err++;
  end
  // REQ pulse width, in clocks, of the last handshake
  int req_hi = 0, req_w = 0;
  always @(posedge clk) begin
    if (req) req_hi <= req_hi + 1;
    else if (req_q) begin req_w <= req_hi; req_hi <= 0; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: sent=%0d received=%0d", sent.size(), sink.q.size());
    check(proto_err == 0, $sformatf("%0d REQ rises while ACK high", proto_err));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      data  = 16'($urandom);
      valid = 1;
      while (!ready) @(negedge clk);
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    while (sink.q.size() < 200) @(posedge clk);
    $display("all words received");
    repeat (10) @(posedge clk);
    check(sink.q.size() == 200, "word count");
    for (int i = 0; i < 200; i++) check(sink.q[i] == sent[i], $sformatf("word %0d", i));
    check(sink.data_changed == 0, "data stable while REQ high");
    check(proto_err == 0, "REQ rises only after ACK fell");
    // Handshake length: REQ rises, receiver acks in 1 clock, 2-flop sync both ways.
    @(negedge clk);
    data = 16'h1234; valid = 1;
    @(negedge clk);
    valid = 0;
    t0 = sink.cyc;
    while (!ready) @(negedge clk);
    $display("handshake cycles: %0d", sink.cyc - t0);
    check(sink.cyc - t0 >= 5 && sink.cyc - t0 <= 12, "handshake length");
    // Back-to-back burst: `valid` stays high and a new word is offered in
    // each clock that takes one. Expected per event: 2 x (2 synchroniser
    // flops + 1 state clock) in the sender, plus 1 clock per edge in the
    // receiver model = 8 clocks.
    begin
      int n0;
      real per;
      sink.min_dly = 0; sink.max_dly = 0;
      repeat (10) @(negedge clk);
      n0 = sink.q.size();
      data = 16'hA000; valid = 1;
      for (int i = 0; i < 41; i++) begin
        // ready seen at a falling edge: the word is taken at the next rising one
        while (!ready) @(negedge clk);
        @(negedge clk);
        data = data + 16'd1;
      end
      valid = 0;
      while (sink.q.size() < n0 + 41) @(negedge clk);
      for (int i = 0; i < 40; i++) check(sink.q[n0 + i + 1] == sink.q[n0 + i] + 16'd1, "burst order");
      per = real'(sink.t[n0 + 40] - sink.t[n0]) / 40.0;
      $display("burst: %0.2f clocks per event, %0.2f Mevent/s at 33 MHz", per, 33.0 / per);
      check(per == 8.0, "burst event rate");
      // REQ is seen by the receiver one clock late, then ACK crosses the
      // two-flop synchroniser and the state clock: 4 clocks
      $display("burst: REQ pulse %0d clocks = %0d ns at 33 MHz", req_w, req_w * 30);
      check(req_w == 4, "REQ pulse width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
