// Testbench of pciaer_regs: writes and reads back CONFIG, INTERRUPTION and
// MEM ADDRESS; checks STATUS assembly from flags and counts, the write-only
// burst length, FIFO access strobes on BAR0 0x0C and BAR1, the word counter
// and its clearing, and the interrupt-clear strobe.
module tb_pciaer_regs;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [5:0] rd_cs = 0, wr_cs = 0, int_en;
  logic b1r = 0, b1w = 0, int_clr, ofifo_wr, ififo_rd, mst_word = 0;
  logic [31:0] adio_in = 0, adio_out, ofifo_din, ififo_dout = 32'hCAFE_F00D, mst_addr, mst_len;
  cfg_t cfg;
  flags_t flags = '0;
  logic [12:0] li, lo, ti = 0, to = 0;
  pciaer_regs dut (.clk, .rst, .rd_cs, .wr_cs, .bar1_rd_cs(b1r), .bar1_wr_cs(b1w), .adio_in, .adio_out,
    .cfg, .int_en, .li, .lo, .int_clr, .flags, .ti, .to, .ofifo_wr, .ofifo_din, .ififo_rd, .ififo_dout,
    .mst_addr, .mst_len, .mst_word);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int r, input logic [31:0] v);
    @(negedge clk);
    wr_cs = 6'(1 << r); adio_in = v;
    #1;
    if (r == 3) check(ofifo_wr && ofifo_din == v, "ofifo write strobe");
    if (r == 2) check(int_clr, "int clear strobe");
    @(negedge clk);
    wr_cs = 0;
  endtask
  task automatic rd(input int r, output logic [31:0] v);
    @(negedge clk);
    rd_cs = 6'(1 << r);
    #1;
    v = adio_out;
    if (r == 3) check(ififo_rd, "ififo read strobe");
    @(negedge clk);
    rd_cs = 0;
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 50; i++) begin
      logic [31:0] c, it, ma;
      c = $urandom; it = $urandom; ma = $urandom;
      wr(0, c); wr(2, it); wr(4, ma);
      rd(0, v); check(v == {7'd0, c[24:0]}, "config");
      check(cfg.eai == c[0] && cfg.eto == c[5] && cfg.tpreo == c[15:12] && cfg.gie == c[16] && cfg.il == c[24], "config fields");
      rd(2, v); check(v == it, "interruption");
      check(int_en == it[5:0] && li == it[18:6] && lo == it[31:19], "interruption fields");
      rd(4, v); check(v == ma && mst_addr == ma, "mem address");
      wr(1, ~ma);
      check(mst_len == ~ma, "burst length");
      flags = 6'($urandom); ti = 13'($urandom); to = 13'($urandom);
      rd(1, v); check(v == {to, ti, flags}, "status");
      rd(3, v); check(v == 32'hCAFE_F00D, "fifo read data");
      wr(3, ma);
    end
    // BAR1 FIFO port
    @(negedge clk);
    b1r = 1; #1;
    check(ififo_rd && adio_out == 32'hCAFE_F00D, "bar1 read");
    b1r = 0; b1w = 1; adio_in = 32'h1234_5678; #1;
    check(ofifo_wr && ofifo_din == 32'h1234_5678, "bar1 write");
    @(negedge clk);
    b1w = 0;
    // word counter
    wr(4, 32'h1000);
    rd(5, v); check(v == 0, "counter cleared");
    for (int i = 0; i < 37; i++) begin
      @(negedge clk); mst_word = 1;
      @(negedge clk); mst_word = 0;
    end
    rd(5, v); check(v == 37, $sformatf("word counter %0d", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
