// Testbench of dat_out: 20 sources offer reply words at random times; a
// behavioural AER receiver with random ACK delay takes them. Checks that every
// word is sent exactly once, that words of one source keep their order, that
// simultaneous offers are granted lowest index first, and almost_full.
module tb_dat_out;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int N = 20;
  logic [N-1:0] sv = '0, sr;
  logic [N-1:0][15:0] sw = '0;
  logic af, req, ack;
  logic [15:0] bus;
  dat_out #(.N_SRC(N), .DEPTH(16)) dut (.clk, .rst, .src_valid(sv), .src_word(sw), .src_ready(sr),
    .almost_full(af), .aer_req(req), .aer_data(bus), .aer_ack(ack));
  aer_sink_model #(.MIN_DLY(0), .MAX_DLY(6)) sink (.clk, .req, .data(bus), .ack);

  int seq [N];
  logic [N-1:0] taken_q;
  always @(posedge clk) taken_q <= sv & sr;
  int total = 0, af_seen = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // priority: all offer at once, FIFO empty
    @(negedge clk);
    for (int i = 0; i < N; i++) begin sv[i] = 1; sw[i] = {4'(i), 12'hF00}; end
    @(negedge clk);
    // exactly the lowest was granted in the first clock
    check(dut.mem[0] == {4'd0, 12'hF00}, "lowest index first");
    sv = '0;
    while (sink.q.size() < 1) @(negedge clk);
    repeat (50) @(negedge clk);
    total = 1;
    // random traffic; each source numbers its words
    for (int i = 0; i < N; i++) seq[i] = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      for (int i = 0; i < N; i++) begin
        if (taken_q[i]) begin sv[i] = 0; seq[i]++; total++; end
        if (!sv[i] && $urandom_range(60) == 0 && seq[i] < 255) begin
          sv[i] = 1; sw[i] = {3'(i / 8), 5'(i), 8'(seq[i])};
        end
      end
      if (af) af_seen++;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) if (taken_q[i]) begin seq[i]++; total++; end
    sv = '0;
    while (sink.q.size() < total) @(negedge clk);
    repeat (50) @(negedge clk);
    check(sink.q.size() == total, $sformatf("sent %0d of %0d", sink.q.size(), total));
    begin
      int nxt [N];
      for (int i = 0; i < N; i++) nxt[i] = 0;
      for (int k = 1; k < sink.q.size(); k++) begin
        int src;
        src = int'(sink.q[k][12:8]);
        check(src < N && int'(sink.q[k][7:0]) == nxt[src], $sformatf("order of source %0d", src));
        if (src < N) nxt[src]++;
      end
    end
    check(sink.data_changed == 0, "bus stable");
    check(af_seen > 0, "almost_full reached");
    $display("words %0d, almost_full clocks %0d", total, af_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
