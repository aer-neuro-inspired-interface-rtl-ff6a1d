// PWM time base shared by all motor processes.
//
// The AER-Robot board has one programmable PWM period for all 16 motors. This
// counter runs 0, 1, ..., period, 0, ... so one PWM period lasts period+1
// clocks. With a 16-bit register and a 50 MHz clock the period spans 2 clocks
// (25 MHz) to 65536 clocks (763 Hz), the range the board was measured at. The
// clock frequency and the "+1" coding are this design's reading of that range.
// A period value of 0 is treated as 1 (the shortest period that can carry PWM).
module pwm_timebase #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] period,
  output logic [W-1:0] cnt,
  output logic         wrap     // high in the last clock of each period
);
  logic [W-1:0] top;
  assign top  = (period == '0) ? W'(1) : period;
  assign wrap = (cnt >= top);

  always_ff @(posedge clk) begin
    if (rst)       cnt <= '0;
    else if (wrap) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end
endmodule
