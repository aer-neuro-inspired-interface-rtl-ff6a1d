// Testbench of out_aer_sm, fed by a real sync_fifo and drained by a
// behavioural AER receiver. Checks:
//  - timed events: REQ rises follow the sum of the programmed time
//    differences exactly (prescaler 3, i.e. one tick = 3 clocks);
//  - late ACK compensation: while the receiver is slow, events fall behind;
//    once it is fast again the stream is back on the original schedule;
//  - the special word waits 65535 ticks and sends nothing;
//  - with timestamps disabled events go out back to back;
//  - disabling the machine stops reading the FIFO.
module tb_out_aer_sm;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en = 0, ts_en = 1, clr = 0, wr = 0, rd, empty, half, full, req, ack;
  logic [3:0] tpre = 0;
  logic [31:0] din = 0, dout;
  logic [15:0] bus;
  logic [6:0] count;
  sync_fifo #(.W(32), .DEPTH(64), .CW(7)) fifo (.clk, .rst, .clr, .wr, .din, .rd, .dout,
    .level(7'd32), .count, .empty, .half, .full);
  out_aer_sm dut (.clk, .rst, .clr, .en, .tpre, .ts_en, .fifo_rd(rd), .fifo_dout(dout), .fifo_empty(empty),
    .aer_req(req), .aer_data(bus), .aer_ack(ack));
  aer_sink_model #(.MIN_DLY(0), .MAX_DLY(0)) sink (.clk, .req, .data(bus), .ack);

  int late_events = 0;
  always @(posedge clk) if (!rst && dut.issue && dut.slack < 0 && dut.tx_valid) late_events++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input logic [15:0] dt, input logic [15:0] a);
    @(negedge clk);
    wr = 1; din = {dt, a};
    @(negedge clk);
    wr = 0;
  endtask

  initial begin
    int dts [$];
    int base, n0, ideal;
    repeat (3) @(posedge clk);
    rst <= 0;
    // 1. timed stream, prescaler: tick = 3 clocks
    tpre = 4'd2;
    dts.push_back(0);
    push(16'd0, 16'd1000);
    for (int i = 1; i < 40; i++) begin
      dts.push_back($urandom_range(40, 5));
      push(16'(dts[i]), 16'(1000 + i));
    end
    en = 1;
    while (sink.q.size() < 40) @(negedge clk);
    ideal = 0;
    for (int i = 0; i < 40; i++) begin
      ideal += dts[i] * 3;
      check(sink.q[i] == 16'(1000 + i), "address");
      check(int'(sink.t[i] - sink.t[0]) == ideal,
            $sformatf("event %0d at %0d, schedule %0d", i, sink.t[i] - sink.t[0], ideal));
    end

    // 2. slow ACK for the first 10 events, then fast: the schedule is kept
    repeat (200) @(negedge clk);
    tpre = 4'd0;
    clr = 1;   // start from a fresh schedule
    @(negedge clk);
    clr = 0;
    n0 = sink.q.size();
    sink.min_dly = 40; sink.max_dly = 40;
    dts.delete();
    for (int i = 0; i < 30; i++) begin
      dts.push_back(i == 0 ? 0 : (i < 10 ? 10 : 60));
      push(16'(dts[i]), 16'(2000 + i));
    end
    while (sink.q.size() < n0 + 10) @(negedge clk);
    sink.min_dly = 0; sink.max_dly = 0;
    while (sink.q.size() < n0 + 30) @(negedge clk);
    ideal = 0;
    for (int i = 0; i < 30; i++) begin
      ideal += dts[i];
      check(sink.q[n0 + i] == 16'(2000 + i), "address");
      if (i >= 1 && i < 10) check(int'(sink.t[n0 + i] - sink.t[n0]) > ideal, "late while ACK is slow");
      if (i >= 20) check(int'(sink.t[n0 + i] - sink.t[n0]) == ideal,
            $sformatf("event %0d at %0d, schedule %0d (caught up)", i, sink.t[n0 + i] - sink.t[n0], ideal));
    end
    check(late_events > 0, "late events compensated");

    // 3. special word: wait 65535 ticks, no event
    repeat (50) @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    n0 = sink.q.size();
    push(16'd0, 16'd3000);
    push(16'hFFFF, 16'hFFFF);
    push(16'd7, 16'd3001);
    while (sink.q.size() < n0 + 2) @(negedge clk);
    check(sink.q[n0 + 1] == 16'd3001, "special word sends nothing");
    check(int'(sink.t[n0 + 1] - sink.t[n0]) == 65535 + 7, $sformatf("special wait %0d", sink.t[n0 + 1] - sink.t[n0]));

    // 4. timestamps off: back to back
    ts_en = 0;
    n0 = sink.q.size();
    for (int i = 0; i < 5; i++) push(16'd5000, 16'(4000 + i));
    while (sink.q.size() < n0 + 5) @(negedge clk);
    for (int i = 1; i < 5; i++) check(int'(sink.t[n0 + i] - sink.t[n0 + i - 1]) < 20, "no wait with ETO off");

    // 5. disabled: FIFO is not read
    en = 0;
    repeat (20) @(negedge clk);
    push(16'd0, 16'd5000);
    repeat (100) @(negedge clk);
    check(count == 1 && sink.q.size() == n0 + 5, "disabled");
    en = 1;
    repeat (100) @(negedge clk);
    check(sink.q.size() == n0 + 6, "enabled again");
    check(sink.data_changed == 0, "bus stable");
    $display("late events %0d", late_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
