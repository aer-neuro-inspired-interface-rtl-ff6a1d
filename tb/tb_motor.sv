// Testbench of motor: loads a pulse count, starts moves up and down with
// several intensities and PWM periods, and drives a behavioural encoder from
// the motor outputs. Checks the duty cycle against (period+1)*intensity/256,
// that only the selected direction is driven, that the motor stops after
// exactly the programmed number of encoder pulses, the position count, the
// two reply words of a state query, and that commands for other motors are
// ignored.
module tb_motor;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [3:0] ID = 4'd6;
  cmd_t cmd = '0;
  logic [15:0] period = 16'd99, cnt;
  logic wrap, a, b, mu, md, rsp_valid, rsp_ready = 0;
  logic [15:0] rsp_word;
  pwm_timebase #(.W(16)) tbase (.clk, .rst, .period, .cnt, .wrap);
  motor #(.ID(ID)) dut (.clk, .rst, .cmd, .pwm_period(period), .pwm_cnt(cnt), .enc_a(a), .enc_b(b),
                        .mu, .md, .rsp_valid, .rsp_word, .rsp_ready);
  enc_model #(.STEP(40), .HOLD(300)) enc (.clk, .mu, .md, .a, .b);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input opcode_e op, input logic [3:0] m, input logic up, input logic [7:0] inten, input logic [8:0] steps);
    @(negedge clk);
    cmd = '0;
    cmd.valid = 1; cmd.op = op; cmd.motor = m; cmd.up = up; cmd.intensity = inten; cmd.steps = steps;
    @(negedge clk);
    cmd = '0;
  endtask

  task automatic query(output logic [15:0] w0, output logic [15:0] w1);
    send(OP_MSTATE, ID, 0, 0, 0);
    @(negedge clk);
    check(rsp_valid, "reply offered");
    w0 = rsp_word;
    rsp_ready = 1;
    @(negedge clk);
    w1 = rsp_word;
    check(rsp_valid, "second reply offered");
    @(negedge clk);
    rsp_ready = 0;
    check(!rsp_valid, "two replies only");
  endtask

  task automatic duty(input logic [15:0] p, input logic [7:0] inten, input logic up);
    int hi = 0, exp_hi;
    period = p;
    send(OP_STEPS, ID, 0, 0, 9'd500);
    send(OP_MOVE, ID, up, inten, 0);
    while (!wrap) @(negedge clk);
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < p + 1; i++) begin
      if (up ? mu : md) hi++;
      check(!(up ? md : mu), "other direction idle");
      @(negedge clk);
    end
    exp_hi = ((p + 1) * inten) >> 8;
    check(hi == exp_hi, $sformatf("duty p=%0d i=%0d: %0d high, expected %0d", p, inten, hi, exp_hi));
    // stop it: a move with zero pulses
    send(OP_STEPS, ID, 0, 0, 9'd0);
    send(OP_MOVE, ID, up, inten, 0);
    repeat (3) @(negedge clk);
    check(!mu && !md, "stopped by zero-pulse move");
    repeat (400) @(negedge clk);
  endtask

  initial begin
    logic [15:0] w0, w1;
    int e0, p0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(negedge clk);
    duty(16'd99, 8'd128, 1);
    duty(16'd255, 8'd64, 0);
    duty(16'd9, 8'd255, 1);
    duty(16'd1, 8'd128, 1);

    // move up 25 pulses
    period = 16'd49;
    e0 = enc.edges;
    p0 = int'($signed(dut.pos));
    send(OP_STEPS, ID, 0, 0, 9'd25);
    send(OP_STEPS, ID + 1, 0, 0, 9'd3);   // another motor: ignored
    send(OP_MOVE, ID, 1, 8'd200, 0);
    repeat (20) @(negedge clk);
    query(w0, w1);
    check(w0[15:14] == RSP_MSTAT && w0[13:10] == ID && w0[9] == 1, "status busy");
    check(w1[15:14] == RSP_MPOS && w1[13:10] == ID, "position word");
    while (dut.busy) @(negedge clk);
    check(int'($signed(dut.pos)) - p0 == 25, $sformatf("stopped after 25 pulses (%0d)", int'($signed(dut.pos)) - p0));
    repeat (400) @(negedge clk);
    check(enc.edges - e0 >= 25, "encoder ran");
    check(int'($signed(dut.pos)) - p0 == enc.edges - e0, "position follows encoder");
    check(dut.remaining == 0, "all pulses done");
    query(w0, w1);
    check(w0 == rsp_mstat(ID, 0, 9'd0), "status idle");
    check(w1 == rsp_mpos(ID, dut.pos[9:0]), "position reply");

    // move down 10 pulses: position decreases
    p0 = int'($signed(dut.pos));
    e0 = enc.edges;
    send(OP_STEPS, ID, 0, 0, 9'd10);
    send(OP_MOVE, ID, 0, 8'd255, 0);
    @(negedge clk);
    check(dut.busy, "down move started");
    while (dut.busy) @(negedge clk);
    check(int'($signed(dut.pos)) <= p0 - 10, "position went down");
    repeat (400) @(negedge clk);
    check(!md && !mu, "motor stopped");
    check(int'($signed(dut.pos)) == p0 - (enc.edges - e0), "down count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
