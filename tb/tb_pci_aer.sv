// Testbench of pci_aer through the PCI core's target back end.
//  1. Internal loop: timed words written to the FIFO register come back
//     through OUT-AER -> IN-AER and are read from the same register; addresses
//     and time differences must match what was written.
//  2. External buses: OUT-AER drives a behavioural receiver, a behavioural
//     sender drives IN-AER.
//  3. STATUS counts and flags, the IFIFO level interrupt, the bus-master
//     end-of-transfer interrupt and its mask, IFIFO reset through RAI.
//  4. The back-to-back event rate through the internal loop, measured by the
//     IN-AER time stamps; the original board reached 6 Mevent/s.
module tb_pci_aer;
  import aer_pkg::*;
  logic clk = 0, rst = 1;
  always #15 clk = ~clk;   // 33 MHz PCI clock
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] base_hit = 0;
  logic [31:0] addr = 0, adio_in = 0, adio_out, mst_addr, mst_len;
  logic s_wrdn = 0, s_data = 0, inta, mst_word = 0, mst_end = 0;
  logic [6:0] mst_ctrl;
  logic reqi, acki, reqo, acko;
  logic [15:0] datai, datao;
  pci_aer #(.FIFO_DEPTH(64)) dut (.pclk(clk), .rst, .base_hit, .addr, .s_wrdn, .s_data, .adio_in, .adio_out, .inta,
    .mst_ctrl, .mst_addr, .mst_len, .mst_word, .mst_end, .reqi, .datai, .acki, .reqo, .datao, .acko);
  aer_src_model #(.GAP(2)) src (.clk, .req(reqi), .data(datai), .ack(acki));
  aer_sink_model #(.MIN_DLY(0), .MAX_DLY(2)) sink (.clk, .req(reqo), .data(datao), .ack(acko));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pwr(input int off, input logic [31:0] v);
    @(negedge clk);
    base_hit = 8'd1; addr = 32'(off); s_wrdn = 1; s_data = 1; adio_in = v;
    @(negedge clk);
    base_hit = 0; s_data = 0;
  endtask
  task automatic prd(input int off, output logic [31:0] v);
    @(negedge clk);
    base_hit = 8'd1; addr = 32'(off); s_wrdn = 0; s_data = 1;
    #1 v = adio_out;
    @(negedge clk);
    base_hit = 0; s_data = 0;
  endtask
  function automatic logic [31:0] mkcfg(bit il, bit rai, bit rao, bit gie, bit mask);
    cfg_t c;
    c = '0;
    c.il = il; c.gie = gie; c.mst = {mask, 6'd0};
    c.eai = 1; c.eao = 1; c.eti = 1; c.eto = 1; c.rai = rai; c.rao = rao;
    return 32'(c);
  endfunction

  initial begin
    logic [31:0] v;
    int dts [20];
    repeat (3) @(posedge clk);
    rst <= 0;
    // 1. internal loop
    pwr(32'h0, mkcfg(1, 0, 0, 0, 0));
    for (int i = 0; i < 20; i++) begin
      dts[i] = (i == 0) ? 0 : $urandom_range(60, 15);
      pwr(32'hC, {16'(dts[i]), 16'(16'hA000 + i)});
    end
    repeat (2000) @(negedge clk);
    prd(32'h4, v);
    check(v[18:6] == 13'd20 && v[31:19] == 13'd0, $sformatf("status counts %h", v));
    check(v[5] && !v[2], "OFE set, IFE clear");
    for (int i = 0; i < 20; i++) begin
      prd(32'hC, v);
      check(v[15:0] == 16'(16'hA000 + i), "looped address");
      if (i > 0) check(int'(v[31:16]) == dts[i], $sformatf("looped time %0d expected %0d", v[31:16], dts[i]));
    end
    check(sink.q.size() == 0 && src.sent == 0, "external buses idle in loop mode");

    // 2. external buses
    pwr(32'h0, mkcfg(0, 0, 0, 0, 0));
    for (int i = 0; i < 10; i++) pwr(32'hC, {16'd5, 16'(16'hB000 + i)});
    for (int i = 0; i < 10; i++) src.q.push_back(16'(16'hC000 + i));
    repeat (1000) @(negedge clk);
    check(sink.q.size() == 10, "external out count");
    for (int i = 0; i < 10 && i < sink.q.size(); i++) check(sink.q[i] == 16'(16'hB000 + i), "external out address");
    for (int i = 0; i < 10; i++) begin
      prd(32'hC, v);
      check(v[15:0] == 16'(16'hC000 + i), "external in address");
    end

    // 3. interrupts: IFIFO level LI = 4, enable IFH
    pwr(32'h8, {13'd0, 13'd4, 6'b000010});
    pwr(32'h0, mkcfg(0, 0, 0, 1, 0));
    repeat (5) @(negedge clk);
    check(!inta, "no interrupt below level");
    for (int i = 0; i < 4; i++) src.q.push_back(16'(i));
    repeat (300) @(negedge clk);
    check(inta, "IFIFO level interrupt");
    pwr(32'h0, mkcfg(0, 1, 0, 1, 0));   // RAI: reset IFIFO
    pwr(32'h0, mkcfg(0, 0, 0, 1, 0));
    prd(32'h4, v);
    check(v[18:6] == 0 && v[2], "IFIFO reset");
    repeat (3) @(negedge clk);
    check(!inta, "interrupt gone");
    // bus master end of transfer
    pwr(32'h8, {13'd0, 13'd4, 6'b000000});
    @(negedge clk); mst_end = 1; @(negedge clk); mst_end = 0;
    repeat (2) @(negedge clk);
    check(inta, "end-of-transfer interrupt");
    pwr(32'h8, 32'd0);                  // clear
    repeat (2) @(negedge clk);
    check(!inta, "end-of-transfer cleared");
    pwr(32'h0, mkcfg(0, 0, 0, 1, 1));   // masked
    @(negedge clk); mst_end = 1; @(negedge clk); mst_end = 0;
    repeat (2) @(negedge clk);
    check(!inta && mst_ctrl[6], "masked end-of-transfer");
    // 4. back-to-back event rate through the internal loop.  The gap between
    //    events is read from the IN-AER time stamps.  Each of the four
    //    handshake edges crosses a two-flop synchroniser, so about 12
    //    clocks per event are expected.
    begin
      cfg_t c;
      int n0;
      longint tsum;
      real per;
      c = cfg_t'(mkcfg(1, 0, 0, 0, 0));
      c.eto = 0;
      c.eti = 1;
      pwr(32'h0, 32'(c));
      for (int i = 0; i < 40; i++) pwr(32'hC, {16'd0, 16'(i)});
      repeat (2000) @(negedge clk);
      prd(32'h4, v);
      n0 = int'(v[18:6]);
      check(n0 == 40, $sformatf("40 looped events (%0d)", n0));
      tsum = 0;
      for (int i = 0; i < 40; i++) begin
        prd(32'hC, v);
        check(v[15:0] == 16'(i), "looped address in order");
        if (i > 0) tsum += longint'(v[31:16]);
      end
      per = real'(tsum) / 39.0;
      $display("internal loop: %0.2f PCI clocks per event, %0.2f Mevent/s at 33 MHz", per, 33.0 / per);
      check(per >= 11.0 && per <= 14.0, "loop event rate matches the synchronised four-phase handshake");
    end
    pwr(32'h10, 32'h0010_0000);
    check(mst_addr == 32'h0010_0000, "master address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
