// End-to-end testbench of aer_robot at its full size (16 motors, 4 sensor
// sets of 16). Commands go in through a behavioural AER sender, replies are
// collected by a behavioural AER receiver, every motor has a behavioural
// encoder and every sensor set a behavioural microcontroller.
// Checks: PWM period commands; moves of several motors at once, each stopping
// after its pulse count, in the right direction; state replies; sensor reads
// of all four sets; back-pressure when many replies queue up; and the command
// rate of back-to-back sensor reads against the board's 3 Mevent/s at 50 MHz.
module tb_aer_robot;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic cmd_req, cmd_ack, dat_req, dat_ack;
  logic [15:0] cmd_data, dat_data, mu, md, ea, eb;
  logic [3:0][3:0] mcu_data;
  logic [3:0][1:0] mcu_half;
  logic [3:0] mcu_start;
  aer_robot dut (.clk, .rst, .cmd_req, .cmd_data, .cmd_ack, .dat_req, .dat_data, .dat_ack,
    .mu, .md, .enc_a(ea), .enc_b(eb), .mcu_data, .mcu_half, .mcu_start);
  aer_src_model #(.GAP(0)) src (.clk, .req(cmd_req), .data(cmd_data), .ack(cmd_ack));
  aer_sink_model #(.MIN_DLY(0), .MAX_DLY(0)) sink (.clk, .req(dat_req), .data(dat_data), .ack(dat_ack));
  for (genvar m = 0; m < 16; m++) begin : g_enc
    enc_model #(.STEP(10 + m), .HOLD(200)) enc (.clk, .mu(mu[m]), .md(md[m]), .a(ea[m]), .b(eb[m]));
  end
  logic [15:0] busy_v;
  for (genvar m = 0; m < 16; m++) begin : g_busy
    assign busy_v[m] = dut.g_motor[m].u_motor.busy;
  end
  for (genvar s = 0; s < 4; s++) begin : g_mcu
    mcu_model #(.HALF(2 + s)) mcu (.clk, .data(mcu_data[s]), .half(mcu_half[s]), .start(mcu_start[s]));
  end

  int backpressure = 0;
  always @(posedge clk) if (dut.reply_full && !rst) backpressure++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] c_steps(int m, int n); return {3'd2, 4'(m), 9'(n)}; endfunction
  function automatic logic [15:0] c_move(int m, bit up, int i); return {3'd3, 4'(m), up, 8'(i)}; endfunction
  function automatic logic [15:0] c_state(int m); return {3'd4, 4'(m), 9'd0}; endfunction
  function automatic logic [15:0] c_sensor(int s, int c); return {3'd5, 2'(s), 4'(c), 7'd0}; endfunction

  task automatic wait_replies(int n);
    while (sink.q.size() < n) @(negedge clk);
  endtask

  initial begin
    int n0;
    int steps [16];
    bit dir [16];
    longint t0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // PWM period 199 -> 200 clocks (250 kHz at 50 MHz)
    src.q.push_back({3'd0, 5'd0, 8'd199});
    src.q.push_back({3'd1, 5'd0, 8'd0});
    while (src.sent < 2) @(negedge clk);
    repeat (5) @(negedge clk);
    check(dut.pwm_period == 16'd199, "period set");

    // start all 16 motors with different pulse counts and directions
    for (int m = 0; m < 16; m++) begin
      steps[m] = 40 + 3 * m;
      dir[m] = m[0];
      src.q.push_back(c_steps(m, steps[m]));
      src.q.push_back(c_move(m, dir[m], 100 + 8 * m));
    end
    while (src.sent < 34) @(negedge clk);
    repeat (10) @(negedge clk);
    for (int m = 0; m < 16; m++) check(busy_v[m], $sformatf("motor %0d moving", m));
    // query all while moving, and read sensors meanwhile
    n0 = sink.q.size();
    for (int m = 0; m < 16; m++) src.q.push_back(c_state(m));
    wait_replies(n0 + 32);
    for (int m = 0; m < 16; m++) begin
      check(sink.q[n0 + 2 * m][15:14] == RSP_MSTAT && sink.q[n0 + 2 * m][13:10] == 4'(m), "status reply");
      check(sink.q[n0 + 2 * m + 1][15:14] == RSP_MPOS && sink.q[n0 + 2 * m + 1][13:10] == 4'(m), "position reply");
    end
    // wait for all motors to finish
    for (int m = 0; m < 16; m++) begin
      while (busy_v[m]) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(mu == 0 && md == 0, "all motors stopped");
    n0 = sink.q.size();
    for (int m = 0; m < 16; m++) src.q.push_back(c_state(m));
    wait_replies(n0 + 32);
    for (int m = 0; m < 16; m++) begin
      logic [15:0] st, ps;
      st = sink.q[n0 + 2 * m];
      ps = sink.q[n0 + 2 * m + 1];
      check(st == rsp_mstat(4'(m), 1'b0, 9'd0), $sformatf("motor %0d done", m));
      // the position moved at least the programmed pulses, in the right direction
      if (dir[m]) check($signed(ps[9:0]) >= 10'(steps[m]), $sformatf("motor %0d up %0d", m, $signed(ps[9:0])));
      else        check($signed(ps[9:0]) <= -$signed(10'(steps[m])), $sformatf("motor %0d down %0d", m, $signed(ps[9:0])));
    end

    // sensors: wait for two full scans of the slowest microcontroller
    begin
      int s0;
      s0 = g_mcu[3].mcu.scans;
      while (g_mcu[3].mcu.scans < s0 + 2) @(negedge clk);
    end
    n0 = sink.q.size();
    for (int s = 0; s < 4; s++) for (int c = 0; c < 16; c++) src.q.push_back(c_sensor(s, c));
    t0 = src.cyc;
    wait_replies(n0 + 64);
    begin
      real per_event;
      per_event = real'(src.cyc - t0) / 64.0;
      $display("sensor reads: %0.1f clocks per command/reply pair (3 Mev/s at 50 MHz = 16.7)", per_event);
      check(per_event <= 16.7, "command rate at least 3 Mevent/s at 50 MHz");
    end
    for (int s = 0; s < 4; s++) for (int c = 0; c < 16; c++) begin
      logic [7:0] v;
      case (s)
        0: v = g_mcu[0].mcu.vals[c];
        1: v = g_mcu[1].mcu.vals[c];
        2: v = g_mcu[2].mcu.vals[c];
        default: v = g_mcu[3].mcu.vals[c];
      endcase
      check(sink.q[n0 + 16 * s + c] == rsp_sensor(2'(s), 4'(c), v), $sformatf("sensor %0d.%0d", s, c));
    end

    // back-pressure: slow receiver, many state queries
    sink.min_dly = 30; sink.max_dly = 30;
    n0 = sink.q.size();
    for (int k = 0; k < 40; k++) src.q.push_back(c_state(k % 16));
    wait_replies(n0 + 80);
    check(backpressure > 0, "back-pressure happened");
    for (int k = 0; k < 40; k++) check(sink.q[n0 + 2 * k][13:10] == 4'(k % 16) && sink.q[n0 + 2 * k][15:14] == RSP_MSTAT, "no reply lost");
    check(sink.data_changed == 0, "output bus stable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
