// Testbench of in_aer_sm with a real sync_fifo (8 words) behind it and a
// behavioural AER sender in front. Checks the stored addresses and the time
// differences against the REQ rise times (exact with one tick per clock,
// within one tick with a prescaler of 4), saturation at 0xFFFF, a zero time
// field with timestamps off, and that a full IFIFO holds the sender off.
module tb_in_aer_sm;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en = 1, ts_en = 1, clr = 0, req, ack, fwr, frd = 0, empty, half, full;
  logic [3:0] tpre = 0;
  logic [15:0] bus;
  logic [31:0] fdin, fdout;
  logic [3:0] count;
  in_aer_sm dut (.clk, .rst, .clr, .en, .tpre, .ts_en, .aer_req(req), .aer_data(bus), .aer_ack(ack),
    .fifo_wr(fwr), .fifo_din(fdin), .fifo_full(full));
  sync_fifo #(.W(32), .DEPTH(8), .CW(4)) fifo (.clk, .rst, .clr, .wr(fwr), .din(fdin), .rd(frd), .dout(fdout),
    .level(4'd4), .count, .empty, .half, .full);
  aer_src_model #(.GAP(0)) src (.clk, .req, .data(bus), .ack);

  longint rise [$];
  logic req_q = 0;
  always @(posedge clk) begin
    req_q <= req;
    if (req && !req_q && !rst) rise.push_back(src.cyc);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pop one word (FWFT) at a negedge
  task automatic pop(output logic [31:0] w);
    while (empty) @(negedge clk);
    w = fdout;
    frd = 1;
    @(negedge clk);
    frd = 0;
  endtask

  task automatic burst(input int n, input int gapmax, input int t, input int tol, input bit sat = 0);
    logic [31:0] w;
    int r0;
    r0 = rise.size();
    for (int i = 0; i < n; i++) begin
      src.q.push_back(16'(100 + i));
      repeat ($urandom_range(gapmax, 1)) @(negedge clk);
      while (src.q.size() > 0) @(negedge clk);
    end
    for (int i = 0; i < n; i++) begin
      pop(w);
      check(w[15:0] == 16'(100 + i), "address");
      if (i > 0 || sat) begin
        int d;
        d = int'((rise[r0 + i] - rise[r0 + i - 1]) / t);
        if (d > 65535) d = 65535;
        check(w[31:16] >= 16'(d - tol) && w[31:16] <= 16'(d + tol),
              $sformatf("event %0d: time %0d, expected %0d", i, w[31:16], d));
      end
    end
  endtask

  initial begin
    logic [31:0] w;
    repeat (3) @(posedge clk);
    rst <= 0;
    // the first event ever has no predecessor: pop it separately
    src.q.push_back(16'd7);
    pop(w);
    check(w[15:0] == 16'd7, "first event");
    burst(6, 30, 1, 0);
    tpre = 4'd3;
    burst(6, 60, 4, 1);
    tpre = 4'd0;
    // saturation
    repeat (70000) @(negedge clk);
    burst(1, 1, 1, 0, 1);
    // timestamps off
    ts_en = 0;
    src.q.push_back(16'd55);
    pop(w);
    check(w == {16'd0, 16'd55}, "no time with ETI off");
    ts_en = 1;
    // full FIFO: 8 words stored, the 9th is not acknowledged
    for (int i = 0; i < 9; i++) src.q.push_back(16'(200 + i));
    repeat (300) @(negedge clk);
    check(full && count == 8, "fifo full");
    check(req && !ack && src.sent == 15 + 8, $sformatf("sender held off (sent %0d)", src.sent));
    for (int i = 0; i < 9; i++) begin
      pop(w);
      check(w[15:0] == 16'(200 + i), "address after full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
