// Testbench of pci_decoder: every BAR0 offset, BAR1, reads and writes, and
// accesses that must select nothing (no data phase, no hit, offsets above 0x14).
module tb_pci_decoder;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [7:0] base_hit;
  logic [31:0] addr;
  logic s_wrdn, s_data, b1r, b1w;
  logic [5:0] rd_cs, wr_cs;
  pci_decoder dut (.base_hit, .addr, .s_wrdn, .s_data, .rd_cs, .wr_cs, .bar1_rd_cs(b1r), .bar1_wr_cs(b1w));
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int off;
      logic [5:0] er, ew;
      base_hit = 8'($urandom_range(3));
      off = $urandom_range(7);
      addr = {$urandom_range(255) == 0 ? 24'h0 : 24'($urandom), 3'(off), 2'($urandom)};
      s_wrdn = 1'($urandom);
      s_data = ($urandom_range(4) != 0);
      #1;
      er = 0; ew = 0;
      if (s_data && base_hit[0] && off < 6) begin
        if (s_wrdn) ew[off] = 1; else er[off] = 1;
      end
      check(rd_cs == er && wr_cs == ew, $sformatf("bar0 off=%0d", off));
      check(b1r == (s_data && base_hit[1] && !s_wrdn), "bar1 read");
      check(b1w == (s_data && base_hit[1] && s_wrdn), "bar1 write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
