// AER-Robot interface: the FPGA logic of the board that connects an AER
// system to the anthropomorphic hand.
//
// Independent processes run in parallel so the board keeps taking commands
// while motors move: CMDin receives 16-bit command events from the input AER
// bus and broadcasts them; 16 motor processes each drive one up/down DC motor
// with PWM for a number of encoder pulses; 4 sensor processes each keep a
// 16-entry table of 8-bit values refreshed by one microcontroller; DATout
// sends the replies on the output AER bus. One PWM period register in CMDin
// sets the shared time base of all motors.
// Motor m = 4*finger + joint, fingers thumb, forefinger, middle finger, ring
// finger. Sensor sets: 0 potentiometers, 1 contacts, 2 tendon tension,
// 3 motor current. Command and reply layouts are defined in aer_pkg.
// Clock: 50 MHz intended (gives the 763 Hz .. 25 MHz PWM range); reset is
// synchronous and active high.
module aer_robot
  import aer_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  // input AER bus (commands)
  input  logic                     cmd_req,
  input  logic [AER_W-1:0]         cmd_data,
  output logic                     cmd_ack,
  // output AER bus (motor and sensor information)
  output logic                     dat_req,
  output logic [AER_W-1:0]         dat_data,
  input  logic                     dat_ack,
  // motors
  output logic [N_MOTORS-1:0]      mu,
  output logic [N_MOTORS-1:0]      md,
  input  logic [N_MOTORS-1:0]      enc_a,
  input  logic [N_MOTORS-1:0]      enc_b,
  // microcontroller links
  input  logic [N_SETS-1:0][3:0]   mcu_data,
  input  logic [N_SETS-1:0][1:0]   mcu_half,
  input  logic [N_SETS-1:0]        mcu_start
);
  localparam int N_SRC = N_MOTORS + N_SETS;

  cmd_t                cmd;
  logic [PERIOD_W-1:0] pwm_period, pwm_cnt;
  logic                pwm_wrap;
  logic                reply_full;

  logic [N_SRC-1:0]            src_valid, src_ready;
  logic [N_SRC-1:0][AER_W-1:0] src_word;

  cmdin u_cmdin (
    .clk, .rst, .aer_req(cmd_req), .aer_data(cmd_data), .aer_ack(cmd_ack),
    .busy(reply_full), .cmd, .pwm_period
  );

  pwm_timebase #(.W(PERIOD_W)) u_pwm (
    .clk, .rst, .period(pwm_period), .cnt(pwm_cnt), .wrap(pwm_wrap)
  );

  for (genvar m = 0; m < N_MOTORS; m++) begin : g_motor
    motor #(.ID(4'(m))) u_motor (
      .clk, .rst, .cmd, .pwm_period, .pwm_cnt,
      .enc_a(enc_a[m]), .enc_b(enc_b[m]), .mu(mu[m]), .md(md[m]),
      .rsp_valid(src_valid[m]), .rsp_word(src_word[m]), .rsp_ready(src_ready[m])
    );
  end

  for (genvar s = 0; s < N_SETS; s++) begin : g_sensor
    logic scan_done;
    sensor_proc #(.SET(2'(s))) u_sensor (
      .clk, .rst, .mcu_data(mcu_data[s]), .mcu_half(mcu_half[s]), .mcu_start(mcu_start[s]),
      .req_valid(cmd.valid && cmd.op == OP_SENSOR && cmd.set == 2'(s)), .req_ch(cmd.ch),
      .rsp_valid(src_valid[N_MOTORS+s]), .rsp_word(src_word[N_MOTORS+s]),
      .rsp_ready(src_ready[N_MOTORS+s]), .scan_done
    );
  end

  dat_out #(.N_SRC(N_SRC), .DEPTH(16)) u_datout (
    .clk, .rst, .src_valid, .src_word, .src_ready, .almost_full(reply_full),
    .aer_req(dat_req), .aer_data(dat_data), .aer_ack(dat_ack)
  );
endmodule
