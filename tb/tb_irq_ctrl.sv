// Testbench of irq_ctrl: random flags, enables, GIE and end-of-transfer
// events against a model of the interrupt equation, with the end-of-transfer
// latch cleared by `clr`; INTA is checked one clock after its causes.
module tb_irq_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [5:0] flags = 0, en = 0;
  logic gie = 0, mst_end = 0, mst_mask = 0, clr = 0, q, inta;
  irq_ctrl dut (.clk, .rst, .flags, .en, .gie, .mst_end, .mst_mask, .clr, .mst_end_q(q), .inta);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic latch = 0, exp_inta = 0;
    int raised = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      flags = 6'($urandom); en = ($urandom_range(3) == 0) ? 6'($urandom) : 6'd0;
      gie = ($urandom_range(3) != 0); mst_end = ($urandom_range(9) == 0);
      mst_mask = ($urandom_range(3) == 0); clr = ($urandom_range(5) == 0);
      // model, evaluated with the latch state before this edge
      exp_inta = gie && ((|(flags & en)) || (latch && !mst_mask));
      if (mst_end) latch = 1; else if (clr) latch = 0;
      @(negedge clk);
      check(inta == exp_inta, $sformatf("inta step %0d", i));
      check(q == latch, "latch");
      if (inta) raised++;
    end
    check(raised > 100, "interrupt raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
