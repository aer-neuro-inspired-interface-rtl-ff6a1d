// Behavioural sensor microcontroller for testbenches. Sends the 16 values of
// `vals` in scans, each value as a high and a low nibble with a strobe, START
// with the high nibble of channel 0; HALF clocks per strobe phase. `scans`
// counts finished scans.
module mcu_model #(
  parameter int HALF = 3
) (
  input  logic       clk,
  output logic [3:0] data,
  output logic [1:0] half,
  output logic       start
);
  logic [7:0] vals [16];
  int scans = 0;
  initial begin
    for (int i = 0; i < 16; i++) vals[i] = 8'(i * 17 + 3);
    data = '0; half = '0; start = 1'b0;
    forever begin
      for (int ch = 0; ch < 16; ch++) begin
        data <= vals[ch][7:4]; half <= 2'b10; start <= (ch == 0);
        repeat (HALF) @(posedge clk);
        half[0] <= 1'b1;
        repeat (HALF) @(posedge clk);
        half[0] <= 1'b0;
        repeat (HALF) @(posedge clk);
        data <= vals[ch][3:0]; half <= 2'b00; start <= 1'b0;
        repeat (HALF) @(posedge clk);
        half[0] <= 1'b1;
        repeat (HALF) @(posedge clk);
        half[0] <= 1'b0;
        repeat (HALF) @(posedge clk);
      end
      scans++;
    end
  end
endmodule
