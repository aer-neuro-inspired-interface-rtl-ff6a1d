// Testbench of cmdin: sends every opcode through a behavioural AER sender and
// checks the decoded broadcast, the PWM period register and that no command
// is acknowledged while `busy` is high.
module tb_cmdin;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic req, ack, busy = 0;
  logic [15:0] bus, period;
  cmd_t cmd;
  cmdin dut (.clk, .rst, .aer_req(req), .aer_data(bus), .aer_ack(ack), .busy, .cmd, .pwm_period(period));
  aer_src_model #(.GAP(2)) src (.clk, .req, .data(bus), .ack);

  cmd_t got [$];
  always @(posedge clk) if (cmd.valid && !rst) got.push_back(cmd);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [$];
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(period == 16'hFFFF, "period reset value");
    for (int i = 0; i < 100; i++) w.push_back(16'($urandom));
    w.push_back({3'd0, 5'd0, 8'h34});
    w.push_back({3'd1, 5'd0, 8'h12});
    foreach (w[i]) src.q.push_back(w[i]);
    while (src.sent < w.size()) @(posedge clk);
    repeat (5) @(posedge clk);
    check(got.size() == w.size(), "command count");
    for (int i = 0; i < w.size() && i < got.size(); i++) begin
      check(got[i].op == opcode_e'(w[i][15:13]), "op");
      if (w[i][15:13] inside {3'd2, 3'd3, 3'd4}) check(got[i].motor == w[i][12:9], "motor");
      if (w[i][15:13] == 3'd3) check(got[i].up == w[i][8] && got[i].intensity == w[i][7:0], "move fields");
      if (w[i][15:13] == 3'd2) check(got[i].steps == w[i][8:0], "steps");
      if (w[i][15:13] == 3'd5) check(got[i].set == w[i][12:11] && got[i].ch == w[i][10:7], "sensor fields");
    end
    check(period == 16'h1234, "period register");
    // back-pressure
    busy <= 1;
    src.q.push_back({3'd4, 4'd5, 9'd0});
    repeat (50) @(posedge clk);
    check(ack == 0 && src.sent == w.size(), "no ack while busy");
    busy <= 0;
    repeat (20) @(posedge clk);
    check(src.sent == w.size() + 1, "ack after busy");
    check(got[$].op == OP_MSTATE && got[$].motor == 4'd5, "held command delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
