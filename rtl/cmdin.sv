// CMDin: command input process of the AER-Robot interface.
//
// Receives one 16-bit command event per AER handshake on the input bus,
// decodes it and broadcasts it for one clock to the motor and sensor
// processes (`cmd`). The PWM period commands are executed here: the period
// register lives in CMDin and feeds the shared PWM time base. Once a command
// is broadcast CMDin is free to take the next one, as in the document. The
// only wait is back-pressure: while `busy` (DATout nearly full) is high no new
// event is acknowledged, so reply events are never lost.
// Command layout: see aer_pkg. Period register reset value 0xFFFF (763 Hz at 50 MHz).
module cmdin
  import aer_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                aer_req,
  input  logic [AER_W-1:0]    aer_data,
  output logic                aer_ack,
  input  logic                busy,
  output cmd_t                cmd,
  output logic [PERIOD_W-1:0] pwm_period
);
  logic             rx_valid;
  logic [AER_W-1:0] rx_data;

  aer_rx #(.W(AER_W)) u_rx (
    .clk, .rst, .aer_req, .aer_data, .aer_ack,
    .ready(!busy), .valid(rx_valid), .data(rx_data)
  );

  // Field decode of the captured word.
  cmd_t dec;
  always_comb begin
    dec           = '0;
    dec.valid     = rx_valid;
    dec.op        = opcode_e'(rx_data[15:13]);
    dec.motor     = rx_data[12:9];
    dec.up        = rx_data[8];
    dec.intensity = rx_data[7:0];
    dec.steps     = rx_data[8:0];
    dec.set       = rx_data[12:11];
    dec.ch        = rx_data[10:7];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd        <= '0;
      pwm_period <= '1;
    end else begin
      cmd <= dec;
      if (dec.valid && dec.op == OP_PERIOD_LO) pwm_period[7:0]  <= rx_data[7:0];
      if (dec.valid && dec.op == OP_PERIOD_HI) pwm_period[15:8] <= rx_data[7:0];
    end
  end
endmodule
