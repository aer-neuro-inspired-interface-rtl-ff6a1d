// End-to-end testbench of aer_hand_system at its default size: the PC side is
// modelled at the PCI core's back end (register reads and writes, bus-master
// strobes), the hand by behavioural encoders and sensor microcontrollers.
// A complete operation: self-test through the internal loop, then switch to
// the external buses, program the PWM period, move motors for a number of
// encoder pulses, read their state and all sensor sets, and read the
// time-stamped replies back from the IFIFO. Each mechanism of the design is
// counted and must occur at least once: timed waits, late-ACK compensation,
// the special wait word, internal loop, mode switch, PWM period change, motor
// moves completed in both directions, sensor reads, DATout back-pressure,
// IFIFO level interrupt, bus-master end-of-transfer interrupt.
module tb_aer_hand_system;
  import aer_pkg::*;
  logic pclk = 0, clk = 0, rst = 1;
  always #15 pclk = ~pclk;   // 33 MHz PCI
  always #10 clk = ~clk;     // 50 MHz AER-Robot
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] base_hit = 0;
  logic [31:0] addr = 0, adio_in = 0, adio_out, mst_addr, mst_len;
  logic s_wrdn = 0, s_data = 0, inta, mst_word = 0, mst_end = 0;
  logic [6:0] mst_ctrl;
  logic [15:0] mu, md, ea, eb;
  logic [3:0][3:0] mcu_data;
  logic [3:0][1:0] mcu_half;
  logic [3:0] mcu_start;

  aer_hand_system dut (.pclk, .clk, .rst, .base_hit, .addr, .s_wrdn, .s_data, .adio_in, .adio_out, .inta,
    .mst_ctrl, .mst_addr, .mst_len, .mst_word, .mst_end, .mu, .md, .enc_a(ea), .enc_b(eb),
    .mcu_data, .mcu_half, .mcu_start);
  for (genvar m = 0; m < 16; m++) begin : g_enc
    enc_model #(.STEP(12 + m), .HOLD(300)) enc (.clk, .mu(mu[m]), .md(md[m]), .a(ea[m]), .b(eb[m]));
  end
  for (genvar s = 0; s < 4; s++) begin : g_mcu
    mcu_model #(.HALF(3)) mcu (.clk, .data(mcu_data[s]), .half(mcu_half[s]), .start(mcu_start[s]));
  end

  // mechanism counters
  int n_timed = 0, n_late = 0, n_special = 0, n_loop = 0, n_switch = 0, n_period = 0;
  int n_up = 0, n_down = 0, n_sensor = 0, n_bp = 0, n_irq_lvl = 0, n_irq_mst = 0;
  logic [15:0] busy_v, busy_q = 0, up_v;
  for (genvar m = 0; m < 16; m++) begin : g_busy
    assign busy_v[m] = dut.u_robot.g_motor[m].u_motor.busy;
    assign up_v[m]   = dut.u_robot.g_motor[m].u_motor.up;
  end
  logic il_q = 0;
  always @(posedge clk) if (!rst) begin
    busy_q <= busy_v;
    for (int m = 0; m < 16; m++) if (busy_q[m] && !busy_v[m]) begin
      if (up_v[m]) n_up++; else n_down++;
    end
    if (dut.u_robot.reply_full) n_bp++;
    if (dut.u_robot.cmd.valid && dut.u_robot.cmd.op == OP_SENSOR) n_sensor++;
    if (dut.u_robot.cmd.valid && dut.u_robot.cmd.op inside {OP_PERIOD_LO, OP_PERIOD_HI}) n_period++;
  end
  always @(posedge pclk) if (!rst) begin
    if (dut.u_pci_aer.u_out.issue) begin
      if (dut.u_pci_aer.u_out.word == OUT_WAIT_WORD) n_special++;
      else begin
        if (dut.u_pci_aer.u_out.word[31:16] != 0) n_timed++;
        if (dut.u_pci_aer.u_out.slack < 0) n_late++;
        if (dut.u_pci_aer.cfg.il) n_loop++;
      end
    end
    il_q <= dut.u_pci_aer.cfg.il;
    if (il_q != dut.u_pci_aer.cfg.il) n_switch++;
  end

  initial begin
    repeat (3000000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pwr(input int off, input logic [31:0] v);
    @(negedge pclk);
    base_hit = 8'd1; addr = 32'(off); s_wrdn = 1; s_data = 1; adio_in = v;
    @(negedge pclk);
    base_hit = 0; s_data = 0;
  endtask
  task automatic prd(input int off, output logic [31:0] v);
    @(negedge pclk);
    base_hit = 8'd1; addr = 32'(off); s_wrdn = 0; s_data = 1;
    #1 v = adio_out;
    @(negedge pclk);
    base_hit = 0; s_data = 0;
  endtask
  function automatic logic [31:0] mkcfg(bit il, bit eai, bit gie);
    cfg_t c;
    c = '0;
    c.il = il; c.gie = gie; c.eai = eai; c.eao = 1; c.eti = 1; c.eto = 1;
    return 32'(c);
  endfunction
  task automatic send(input int dt, input logic [15:0] w);
    pwr(32'hC, {16'(dt), w});
  endtask
  // read n replies from the IFIFO (waits for them)
  task automatic get(input int n, ref logic [31:0] q [$]);
    logic [31:0] v;
    int guard;
    guard = 0;
    while (q.size() < n && guard < 200000) begin
      prd(32'h4, v);
      if (!v[2]) begin
        prd(32'hC, v);
        q.push_back(v);
      end
      guard++;
    end
  endtask

  initial begin
    logic [31:0] v;
    logic [31:0] r [$];
    repeat (4) @(posedge pclk);
    rst <= 0;
    repeat (4) @(posedge pclk);
    // 1. self-test through the internal loop
    pwr(32'h0, mkcfg(1, 1, 0));
    for (int i = 0; i < 8; i++) send(i == 0 ? 0 : 40, 16'(16'h5A00 + i));
    get(8, r);
    for (int i = 0; i < 8; i++) begin
      check(r[i][15:0] == 16'(16'h5A00 + i), "loop address");
      if (i > 0) check(r[i][31:16] == 16'd40, $sformatf("loop time %0d", r[i][31:16]));
    end
    r.delete();
    // 2. external: program the PWM period (0x00C7 -> 200 clocks)
    pwr(32'h0, mkcfg(0, 1, 0));
    send(0, {3'd0, 5'd0, 8'hC7});
    send(2, {3'd1, 5'd0, 8'h00});
    // motors 0..3 up, 12..15 down, timed 30 ticks apart
    for (int m = 0; m < 4; m++) begin
      send(30, {3'd2, 4'(m), 9'(20 + m)});
      send(30, {3'd3, 4'(m), 1'b1, 8'd180});
      send(30, {3'd2, 4'(m + 12), 9'(15 + m)});
      send(30, {3'd3, 4'(m + 12), 1'b0, 8'd220});
    end
    // a long pause with the special word, then sensor reads of every set
    send(16'hFFFF, 16'hFFFF);
    for (int s = 0; s < 4; s++) for (int c = 0; c < 16; c += 5) send(0, {3'd5, 2'(s), 4'(c), 7'd0});
    get(16, r);
    for (int k = 0; k < 16; k++) begin
      int s, c;
      logic [7:0] val;
      s = k / 4; c = (k % 4) * 5;
      case (s)
        0: val = g_mcu[0].mcu.vals[c];
        1: val = g_mcu[1].mcu.vals[c];
        2: val = g_mcu[2].mcu.vals[c];
        default: val = g_mcu[3].mcu.vals[c];
      endcase
      check(r[k][15:0] == rsp_sensor(2'(s), 4'(c), val), $sformatf("sensor reply %0d: %h", k, r[k][15:0]));
    end
    check(dut.u_robot.pwm_period == 16'd199, "PWM period programmed");
    // wait for the moves, then ask every moved motor for its state
    while (busy_v != 0) @(negedge clk);
    repeat (400) @(negedge clk);
    r.delete();
    for (int m = 0; m < 4; m++) begin
      send(0, {3'd4, 4'(m), 9'd0});
      send(0, {3'd4, 4'(m + 12), 9'd0});
    end
    get(16, r);
    for (int m = 0; m < 4; m++) begin
      check(r[4 * m][15:0] == rsp_mstat(4'(m), 1'b0, 9'd0), "up motor status");
      check(r[4 * m + 1][15:14] == RSP_MPOS && $signed(r[4 * m + 1][9:0]) >= $signed(10'(20 + m)), "up motor position");
      check(r[4 * m + 2][15:0] == rsp_mstat(4'(m + 12), 1'b0, 9'd0), "down motor status");
      check(r[4 * m + 3][15:14] == RSP_MPOS && $signed(r[4 * m + 3][9:0]) <= -$signed(10'(15 + m)), "down motor position");
    end
    // 3. back-pressure: IN-AER disabled, 30 state queries, then enabled with a level interrupt at 40
    pwr(32'h8, {13'd0, 13'd40, 6'b000010});
    pwr(32'h0, mkcfg(0, 0, 1));
    r.delete();
    for (int k = 0; k < 30; k++) send(0, {3'd4, 4'(k % 16), 9'd0});
    repeat (3000) @(negedge pclk);
    check(n_bp > 0, "robot reply queue full");
    check(!inta, "no interrupt yet");
    pwr(32'h0, mkcfg(0, 1, 1));
    repeat (3000) @(negedge pclk);
    prd(32'h4, v);
    check(v[18:6] == 13'd60, $sformatf("60 replies queued (%0d)", v[18:6]));
    if (inta) n_irq_lvl++;
    get(60, r);
    for (int k = 0; k < 30; k++) check(r[2 * k][13:10] == 4'(k % 16), "reply order");
    // 4. bus master end-of-transfer interrupt
    pwr(32'h8, 32'd0);
    pwr(32'h10, 32'h0800_0000);
    for (int k = 0; k < 8; k++) begin @(negedge pclk); mst_word = 1; @(negedge pclk); mst_word = 0; end
    @(negedge pclk); mst_end = 1; @(negedge pclk); mst_end = 0;
    repeat (2) @(negedge pclk);
    if (inta) n_irq_mst++;
    prd(32'h14, v);
    check(v == 8, "master word counter");

    $display("timed %0d late %0d special %0d loop %0d switch %0d period %0d up %0d down %0d sensor %0d backpressure %0d irq_level %0d irq_master %0d",
             n_timed, n_late, n_special, n_loop, n_switch, n_period, n_up, n_down, n_sensor, n_bp, n_irq_lvl, n_irq_mst);
    check(n_timed > 0, "timed events");
    check(n_late > 0, "late-ACK compensation");
    check(n_special > 0, "special wait word");
    check(n_loop > 0, "internal loop");
    check(n_switch > 0, "mode switch");
    check(n_period > 0, "PWM period commands");
    check(n_up >= 4 && n_down >= 4, "moves up and down completed");
    check(n_sensor > 0, "sensor reads");
    check(n_bp > 0, "back-pressure");
    check(n_irq_lvl > 0, "IFIFO level interrupt");
    check(n_irq_mst > 0, "end-of-transfer interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
