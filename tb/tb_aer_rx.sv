// Testbench of aer_rx: a behavioural sender sends random addresses; `ready`
// is toggled at random. Checks each address comes out once and in order, that
// nothing is taken while ready is low, and the REQ-to-valid latency.
module tb_aer_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic req, ack, ready = 1, valid;
  logic [15:0] bus, data;
  aer_rx #(.W(16)) dut (.clk, .rst, .aer_req(req), .aer_data(bus), .aer_ack(ack), .ready, .valid, .data);
  aer_src_model #(.GAP(3)) src (.clk, .req, .data(bus), .ack);

  logic [15:0] exp [$];
  logic [15:0] got [$];
  int bad_ready = 0;
  logic ready_q = 1;
  always @(posedge clk) begin
    ready_q <= ready;
    if (valid && !rst) got.push_back(data);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // latency with ready high
    src.q.push_back(16'hBEEF);
    exp.push_back(16'hBEEF);
    @(posedge src.req);
    t0 = src.cyc;
    @(posedge clk);
    while (!valid) @(posedge clk);
    $display("REQ to valid: %0d clocks", src.cyc - t0);
    check(src.cyc - t0 <= 4, "REQ to valid latency");
    for (int i = 0; i < 300; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      src.q.push_back(w);
      exp.push_back(w);
    end
    fork
      begin
        while (src.sent < 301) begin
          ready <= ($urandom_range(3) != 0);
          @(posedge clk);
        end
      end
    join
    ready <= 1;
    repeat (10) @(posedge clk);
    check(got.size() == 301, $sformatf("count %0d", got.size()));
    for (int i = 0; i < 301 && i < got.size(); i++) check(got[i] == exp[i], $sformatf("word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
