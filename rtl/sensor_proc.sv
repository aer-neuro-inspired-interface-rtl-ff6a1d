// Sensor process: one per microcontroller, four in all (potentiometers,
// contacts, tendon tension, motor current).
//
// The microcontroller scans its 16 analog inputs, converts each to 8 bits and
// sends the values to the FPGA, refreshing the whole table about every 184 us.
// This process keeps the values in a 16-address RAM, so a read command never
// waits for the microcontroller: the value is read from the RAM in one clock
// and the reply word goes to DATout at once.
//
// Link (this design's reading of the per-microcontroller signals of the
// board: a 4-bit data bus, a 2-bit "half" signal and a START line):
//   mcu_data[3:0]  nibble of the current value
//   mcu_half[1]    1 = high nibble, 0 = low nibble
//   mcu_half[0]    strobe: the nibble is taken on its rising edge
//   mcu_start      high with the high nibble of channel 0 of a scan
// The high nibble comes first; the low nibble writes RAM[channel] and advances
// the channel. All link inputs pass a two-flop synchroniser; data and half
// must be set up at least one clock before the strobe rises.
// Read timing: `req_valid` in clock n, reply word valid in clock n+1.
module sensor_proc
  import aer_pkg::*;
#(
  parameter logic [1:0] SET = 2'd0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       mcu_data,
  input  logic [1:0]       mcu_half,
  input  logic             mcu_start,
  input  logic             req_valid,
  input  logic [3:0]       req_ch,
  output logic             rsp_valid,
  output logic [AER_W-1:0] rsp_word,
  input  logic             rsp_ready,
  output logic             scan_done   // pulses when channel 15 is written
);
  logic [7:0] ram [N_CH];

  logic [6:0] link_s;
  aer_sync #(.W(7)) u_sync (.clk, .rst, .d({mcu_start, mcu_half, mcu_data}), .q(link_s));
  logic [3:0] nib;
  logic       hi_sel, strobe, start, strobe_q;
  assign {start, hi_sel, strobe, nib} = link_s;

  logic [3:0] wr_ch;
  logic [3:0] hi_nib;
  logic       wr_en;
  assign wr_en = strobe && !strobe_q && !hi_sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_q  <= 1'b0;
      wr_ch     <= '0;
      hi_nib    <= '0;
      scan_done <= 1'b0;
    end else begin
      strobe_q  <= strobe;
      scan_done <= 1'b0;
      if (strobe && !strobe_q) begin
        if (hi_sel) begin
          hi_nib <= nib;
          if (start) wr_ch <= '0;
        end else begin
          wr_ch     <= wr_ch + 1'b1;
          scan_done <= (wr_ch == 4'd15);
        end
      end
    end
  end

  // RAM: one write port from the link, one read port for the reply.
  always_ff @(posedge clk) begin
    if (wr_en) ram[wr_ch] <= {hi_nib, nib};
  end

  logic [3:0] rd_ch;
  logic [7:0] rd_val;
  always_ff @(posedge clk) begin
    if (rst) begin
      rsp_valid <= 1'b0;
      rd_ch     <= '0;
      rd_val    <= '0;
    end else begin
      if (req_valid) begin
        rsp_valid <= 1'b1;
        rd_ch     <= req_ch;
        rd_val    <= ram[req_ch];
      end else if (rsp_ready) begin
        rsp_valid <= 1'b0;
      end
    end
  end
  assign rsp_word = rsp_sensor(SET, rd_ch, rd_val);
endmodule
