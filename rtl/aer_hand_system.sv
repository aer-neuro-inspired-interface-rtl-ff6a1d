// Complete PC-to-hand chain: the PCI-AER board and the AER-Robot board joined
// by their two AER buses.
//
// The PCI-AER output bus carries command events to the AER-Robot input bus;
// the AER-Robot output bus carries motor and sensor replies back to the
// PCI-AER input bus, where they are time-stamped into the IFIFO. The two
// boards run on their own clocks (pclk: PCI, 33 MHz; clk: AER-Robot, 50 MHz)
// and meet only through the asynchronous four-phase handshakes. The PCI core
// and the hand (motor drivers, encoders, sensor microcontrollers) are outside:
// their signals are the ports. Reset is shared, synchronous to each clock.
module aer_hand_system
  import aer_pkg::*;
(
  input  logic                     pclk,
  input  logic                     clk,
  input  logic                     rst,
  // PCI core back end
  input  logic [7:0]               base_hit,
  input  logic [31:0]              addr,
  input  logic                     s_wrdn,
  input  logic                     s_data,
  input  logic [31:0]              adio_in,
  output logic [31:0]              adio_out,
  output logic                     inta,
  output logic [6:0]               mst_ctrl,
  output logic [31:0]              mst_addr,
  output logic [31:0]              mst_len,
  input  logic                     mst_word,
  input  logic                     mst_end,
  // hand
  output logic [N_MOTORS-1:0]      mu,
  output logic [N_MOTORS-1:0]      md,
  input  logic [N_MOTORS-1:0]      enc_a,
  input  logic [N_MOTORS-1:0]      enc_b,
  input  logic [N_SETS-1:0][3:0]   mcu_data,
  input  logic [N_SETS-1:0][1:0]   mcu_half,
  input  logic [N_SETS-1:0]        mcu_start
);
  logic             cmd_req, cmd_ack, dat_req, dat_ack;
  logic [AER_W-1:0] cmd_data, dat_data;

  pci_aer u_pci_aer (
    .pclk, .rst, .base_hit, .addr, .s_wrdn, .s_data, .adio_in, .adio_out, .inta,
    .mst_ctrl, .mst_addr, .mst_len, .mst_word, .mst_end,
    .reqi(dat_req), .datai(dat_data), .acki(dat_ack),
    .reqo(cmd_req), .datao(cmd_data), .acko(cmd_ack)
  );

  aer_robot u_robot (
    .clk, .rst, .cmd_req, .cmd_data, .cmd_ack, .dat_req, .dat_data, .dat_ack,
    .mu, .md, .enc_a, .enc_b, .mcu_data, .mcu_half, .mcu_start
  );
endmodule
