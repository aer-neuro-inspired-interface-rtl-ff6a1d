// Testbench of sync_fifo at its full default depth (4096 x 32): random pushes
// and pops against a queue model; checks data order, count, empty, full,
// the programmable half flag, drops on full, and clear.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int D = 4096;
  logic clr = 0, wr = 0, rd = 0, empty, half, full;
  logic [31:0] din = 0, dout;
  logic [12:0] level = 13'd100, count;
  sync_fifo #(.W(32), .DEPTH(D), .CW(13)) dut (.clk, .rst, .clr, .wr, .din, .rd, .dout, .level, .count, .empty, .half, .full);

  logic [31:0] m [$];
  int full_seen = 0, half_seen = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int pw, input int pr);
    @(negedge clk);
    check(count == 13'(m.size()), "count");
    check(empty == (m.size() == 0), "empty");
    check(full == (m.size() == D), "full");
    check(half == (m.size() >= int'(level)), "half");
    if (m.size() > 0) check(dout == m[0], "data");
    if (full) full_seen++;
    if (half) half_seen++;
    wr = ($urandom_range(99) < pw);
    rd = ($urandom_range(99) < pr);
    din = $urandom;
    begin
      bit was_full;
      was_full = (m.size() == D);
      if (rd && m.size() > 0) void'(m.pop_front());
      if (wr && !was_full) m.push_back(din);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) step(60, 40);
    level = 13'd2000;
    for (int i = 0; i < 12000; i++) step(90, 10);   // fill, hit full
    for (int i = 0; i < 12000; i++) step(10, 90);   // drain
    for (int i = 0; i < 3000; i++) step(50, 50);
    @(negedge clk);
    wr = 0; rd = 0; clr = 1;
    m.delete();
    @(negedge clk);
    clr = 0;
    check(empty && count == 0, "clear");
    check(full_seen > 0 && half_seen > 0, "full and half reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
