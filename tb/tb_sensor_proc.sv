// Testbench of sensor_proc: a behavioural microcontroller sends scans of 16
// values over the nibble link. After a full scan every channel is read back
// and must reply, one clock after the request, with the value sent; the
// values are then changed and checked again after the next scans (table
// refresh). The reply layout carries the set number and channel.
// A second process is fed at the board's pace (16 values x 6 strobe phases x
// 95 clocks = 9120 clocks, 182.4 us at 50 MHz): its scan period is measured
// and a new set of values must be readable 184 us (9200 clocks) after the
// microcontroller starts sending it.
module tb_sensor_proc;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [3:0] d;
  logic [1:0] h;
  logic st, req_valid = 0, rsp_valid, rsp_ready = 0, scan_done;
  logic [3:0] req_ch = 0;
  logic [15:0] rsp_word;
  sensor_proc #(.SET(2'd2)) dut (.clk, .rst, .mcu_data(d), .mcu_half(h), .mcu_start(st),
    .req_valid, .req_ch, .rsp_valid, .rsp_word, .rsp_ready, .scan_done);
  mcu_model #(.HALF(3)) mcu (.clk, .data(d), .half(h), .start(st));

  int scan_pulses = 0;
  always @(posedge clk) if (scan_done && !rst) scan_pulses++;

  localparam int SLOW_HALF    = 95;
  localparam int REFRESH_CLKS = 9200;    // 184 us at 50 MHz
  logic [3:0] d2;
  logic [1:0] h2;
  logic st2, req2_valid = 0, rsp2_valid, scan2_done;
  logic [3:0] req2_ch = 0;
  logic [15:0] rsp2_word;
  sensor_proc #(.SET(2'd1)) dut2 (.clk, .rst, .mcu_data(d2), .mcu_half(h2), .mcu_start(st2),
    .req_valid(req2_valid), .req_ch(req2_ch), .rsp_valid(rsp2_valid), .rsp_word(rsp2_word),
    .rsp_ready(1'b1), .scan_done(scan2_done));
  mcu_model #(.HALF(SLOW_HALF)) mcu2 (.clk, .data(d2), .half(h2), .start(st2));

  longint cyc = 0, scan2_t[$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (scan2_done && !rst) scan2_t.push_back(cyc);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      req_valid = 1; req_ch = 4'(c);
      @(negedge clk);
      req_valid = 0;
      check(rsp_valid, "reply one clock after request");
      check(rsp_word == rsp_sensor(2'd2, 4'(c), mcu.vals[c]),
            $sformatf("ch %0d: %h expected %h", c, rsp_word, rsp_sensor(2'd2, 4'(c), mcu.vals[c])));
      rsp_ready = 1;
      @(negedge clk);
      rsp_ready = 0;
      check(!rsp_valid, "reply taken");
    end
  endtask

  initial begin
    int s0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // the model may start mid-reset; wait for two full scans
    s0 = mcu.scans;
    while (mcu.scans < s0 + 2) @(posedge clk);
    repeat (10) @(posedge clk);
    read_all();
    for (int i = 0; i < 16; i++) mcu.vals[i] = 8'($urandom);
    s0 = mcu.scans;
    while (mcu.scans < s0 + 2) @(posedge clk);
    repeat (10) @(posedge clk);
    read_all();
    check(scan_pulses >= 3, "scan_done pulses");

    // board-paced process: scan period and refresh within 184 us
    while (scan2_t.size() < 2) @(negedge clk);
    begin
      longint per;
      int n;
      per = scan2_t[1] - scan2_t[0];
      $display("board-paced scan: %0d clocks = %0.1f us at 50 MHz", per, real'(per) * 0.02);
      check(per == longint'(16 * 6 * SLOW_HALF), $sformatf("scan period %0d clocks", per));
      check(per <= longint'(REFRESH_CLKS), "whole table refreshed within 184 us");
      // new values, changed just after a scan ends, so they are sent from the
      // start of the next one
      n = scan2_t.size();
      while (scan2_t.size() == n) @(negedge clk);
      for (int i = 0; i < 16; i++) mcu2.vals[i] = 8'($urandom);
      repeat (REFRESH_CLKS) @(negedge clk);
      for (int c = 0; c < 16; c++) begin
        req2_valid = 1; req2_ch = 4'(c);
        @(negedge clk);
        req2_valid = 0;
        check(rsp2_valid && rsp2_word == rsp_sensor(2'd1, 4'(c), mcu2.vals[c]),
              $sformatf("board-paced ch %0d: %h expected %h", c, rsp2_word,
                        rsp_sensor(2'd1, 4'(c), mcu2.vals[c])));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
