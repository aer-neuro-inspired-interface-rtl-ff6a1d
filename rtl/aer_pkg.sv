// Shared types and constants of the AER-Robot interface and the PCI-AER back end.
//
// Every command and every reply travels as one 16-bit AER address event. The
// document only says that the command or the sensor value is coded in those
// 16 bits and that one command produces one or two reply events; the bit
// layouts below are this design's own choice.
//
// Command word (input AER bus of the AER-Robot board):
//   [15:13] opcode
//     OP_PERIOD_LO  [7:0]  low byte of the PWM period register
//     OP_PERIOD_HI  [7:0]  high byte of the PWM period register
//     OP_STEPS      [12:9] motor, [8:0] number of encoder pulses for the next move
//     OP_MOVE       [12:9] motor, [8] 1 = up / 0 = down, [7:0] PWM intensity
//     OP_MSTATE     [12:9] motor: ask for the motor state (two reply events)
//     OP_SENSOR     [12:11] sensor set, [10:7] channel: ask for a sensor value
// Reply word (output AER bus):
//   [15:14] RSP_SENSOR : [13:12] set, [11:8] channel, [7:0] value
//   [15:14] RSP_MSTAT  : [13:10] motor, [9] busy, [8:0] pulses still to go
//   [15:14] RSP_MPOS   : [13:10] motor, [9:0] encoder position (two's complement, low bits)
package aer_pkg;

  localparam int AER_W     = 16;  // AER bus width
  localparam int N_MOTORS  = 16;  // motor processes
  localparam int N_SETS    = 4;   // sensor processes / microcontrollers
  localparam int N_CH      = 16;  // sensors per microcontroller
  localparam int PERIOD_W  = 16;  // PWM period register width
  localparam int STEPS_W   = 9;   // encoder pulses per move command
  localparam int POS_W     = 16;  // encoder position counter

  typedef enum logic [2:0] {
    OP_PERIOD_LO = 3'd0,
    OP_PERIOD_HI = 3'd1,
    OP_STEPS     = 3'd2,
    OP_MOVE      = 3'd3,
    OP_MSTATE    = 3'd4,
    OP_SENSOR    = 3'd5
  } opcode_e;

  typedef enum logic [1:0] {
    RSP_SENSOR = 2'd0,
    RSP_MSTAT  = 2'd1,
    RSP_MPOS   = 2'd2
  } rsp_e;

  // Decoded command broadcast by CMDin to the motor and sensor processes.
  typedef struct packed {
    logic               valid;     // one-clock pulse
    opcode_e            op;
    logic [3:0]         motor;
    logic               up;
    logic [7:0]         intensity;
    logic [STEPS_W-1:0] steps;
    logic [1:0]         set;
    logic [3:0]         ch;
  } cmd_t;

  // Sensor sets, in the order of the document's list.
  localparam logic [1:0] SET_POT     = 2'd0;  // finger articulation potentiometers
  localparam logic [1:0] SET_CONTACT = 2'd1;  // fingertip and palm contact
  localparam logic [1:0] SET_TENSION = 2'd2;  // tendon tension
  localparam logic [1:0] SET_CURRENT = 2'd3;  // motor current (Hall effect)

  function automatic logic [15:0] rsp_sensor(logic [1:0] set, logic [3:0] ch, logic [7:0] v);
    return {RSP_SENSOR, set, ch, v};
  endfunction
  function automatic logic [15:0] rsp_mstat(logic [3:0] m, logic busy, logic [STEPS_W-1:0] rem);
    return {RSP_MSTAT, m, busy, rem};
  endfunction
  function automatic logic [15:0] rsp_mpos(logic [3:0] m, logic [9:0] pos);
    return {RSP_MPOS, m, pos};
  endfunction

  // ---------------- PCI-AER back end ----------------
  localparam int FIFO_CW = 13;  // FIFO word count width (TI[12:0], TO[12:0])

  // CONFIG register (BAR0 offset 0x00). Field names and widths are those of
  // the board's register map; the bit positions are this design's choice.
  typedef struct packed {
    logic [6:0] unused;  // [31:25]
    logic       il;      // [24] internal loop
    logic [6:0] mst;     // [23:17] bus master control, passed to the PCI core
    logic       gie;     // [16] global interrupt enable
    logic [3:0] tpreo;   // [15:12] OUT-AER timer prescaler (tick = tpreo+1 clocks)
    logic [3:0] tprei;   // [11:8] IN-AER timer prescaler
    logic       tom;     // [7] stored only
    logic       tim;     // [6] stored only
    logic       eto;     // [5] timestamps used on output
    logic       eti;     // [4] timestamps stored on input
    logic       rao;     // [3] reset OUT path (OFIFO and state machine)
    logic       eao;     // [2] enable OUT-AER
    logic       rai;     // [1] reset IN path
    logic       eai;     // [0] enable IN-AER
  } cfg_t;

  // Flag vector order shared by STATUS[5:0] and INTERRUPTION[5:0].
  typedef struct packed {
    logic of_e;  // [5] OFIFO empty
    logic of_h;  // [4] OFIFO at or above level LO
    logic of_f;  // [3] OFIFO full
    logic if_e;  // [2] IFIFO empty
    logic if_h;  // [1] IFIFO at or above level LI
    logic if_f;  // [0] IFIFO full
  } flags_t;

  // Special OFIFO word: wait the longest time, send no event.
  localparam logic [31:0] OUT_WAIT_WORD = 32'hFFFF_FFFF;

endpackage
