// Behavioural two-channel motor encoder for testbenches. While the motor is
// driven (a PWM pulse on `mu` or `md` seen within the last HOLD clocks) the
// quadrature phase advances every STEP clocks: up gives A leading B, down
// gives B leading A. `edges` counts rising edges of A.
module enc_model #(
  parameter int STEP = 20,
  parameter int HOLD = 600
) (
  input  logic clk,
  input  logic mu,
  input  logic md,
  output logic a,
  output logic b
);
  int unsigned since_u = 1000000, since_d = 1000000, div = 0;
  logic [1:0] ph = 2'd0;
  int edges = 0;
  always @(posedge clk) begin
    since_u <= mu ? 0 : since_u + 1;
    since_d <= md ? 0 : since_d + 1;
    if (since_u < HOLD || since_d < HOLD) begin
      div <= div + 1;
      if (div == STEP - 1) begin
        div <= 0;
        if (since_u < HOLD) ph <= ph + 1'b1;
        else                ph <= ph - 1'b1;
        if ((since_u < HOLD && ph == 2'd0) || (since_u >= HOLD && ph == 2'd3)) edges++;
      end
    end
  end
  // Gray sequence 00 -> 10 -> 11 -> 01 (A rises with B low when going up).
  always_comb begin
    case (ph)
      2'd0: {a, b} = 2'b00;
      2'd1: {a, b} = 2'b10;
      2'd2: {a, b} = 2'b11;
      default: {a, b} = 2'b01;
    endcase
  end
endmodule
