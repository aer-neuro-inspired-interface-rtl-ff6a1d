// Testbench of pwm_timebase: for several period values, measures the number
// of clocks between wraps (period+1; 2 for period 0 or 1) and checks the
// counter runs 0..period. Includes 0xFFFF (65536 clocks, 763 Hz at 50 MHz)
// and 1 (2 clocks, 25 MHz at 50 MHz).
module tb_pwm_timebase;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [15:0] period = 16'd9, cnt;
  logic wrap;
  pwm_timebase #(.W(16)) dut (.clk, .rst, .period, .cnt, .wrap);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [15:0] p, input int exp_len);
    int len;
    logic [15:0] mx;
    period <= p;
    @(posedge clk);
    while (!wrap) @(posedge clk);
    @(posedge clk);
    while (!wrap) @(posedge clk);
    @(posedge clk);
    len = 0; mx = 0;
    check(cnt == 0, "restart at 0");
    do begin
      if (cnt > mx) mx = cnt;
      len++;
      @(posedge clk);
    end while (cnt != 0);
    check(len == exp_len, $sformatf("period %0d: %0d clocks, expected %0d", p, len, exp_len));
    check(mx == 16'(exp_len - 1), "max count");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    measure(16'd9, 10);
    measure(16'd1, 2);
    measure(16'd0, 2);
    measure(16'd255, 256);
    measure(16'hFFFF, 65536);
    measure(16'd3, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
