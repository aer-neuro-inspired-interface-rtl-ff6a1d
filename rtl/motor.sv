// Motor process: one per DC motor of the hand (16 in all).
//
// A STEPS command loads the number of encoder pulses of the next move; a MOVE
// command sets direction and 8-bit PWM intensity and starts the motor. While
// the move is running, `mu` (up) or `md` (down) carries the PWM signal: high
// while the shared PWM counter is below (period+1)*intensity/256. Every
// encoder pulse counts the remaining pulses down; at zero the drive stops.
// The two-channel encoder is decoded x1: a rising edge of A counts +1 when B
// is low and -1 when B is high, into a 16-bit position that is always kept.
// A MSTATE command queues two reply words for DATout: status (busy, pulses to
// go) and position. The document gives the behaviour (up/down, a number of
// encoder pulses, programmed intensity, state query); the encoder decoding,
// the duty formula and the reply layout are this design's choices.
// Timing: drive starts the clock after the MOVE command; encoder inputs pass a
// two-flop synchroniser; the drive stops the clock after the last pulse.
module motor
  import aer_pkg::*;
#(
  parameter logic [3:0] ID = 4'd0
) (
  input  logic                clk,
  input  logic                rst,
  input  cmd_t                cmd,
  input  logic [PERIOD_W-1:0] pwm_period,
  input  logic [PERIOD_W-1:0] pwm_cnt,
  input  logic                enc_a,
  input  logic                enc_b,
  output logic                mu,
  output logic                md,
  output logic                rsp_valid,
  output logic [AER_W-1:0]    rsp_word,
  input  logic                rsp_ready
);
  logic [STEPS_W-1:0] steps_reg, remaining;
  logic               busy, up;
  logic [7:0]         intensity;
  logic [POS_W-1:0]   pos;
  logic               pend_stat, pend_pos;
  logic [AER_W-1:0]   stat_word, pos_word;

  // Encoder decoding.
  logic [1:0] enc_s;
  logic       a_q;
  aer_sync #(.W(2)) u_sync (.clk, .rst, .d({enc_a, enc_b}), .q(enc_s));
  logic enc_pulse, enc_dn;
  assign enc_pulse = enc_s[1] && !a_q;
  assign enc_dn    = enc_s[0];

  logic for_me;
  assign for_me = cmd.valid && cmd.motor == ID;

  always_ff @(posedge clk) begin
    if (rst) begin
      steps_reg <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      up        <= 1'b0;
      intensity <= '0;
      pos       <= '0;
      a_q       <= 1'b0;
    end else begin
      a_q <= enc_s[1];
      if (enc_pulse) pos <= enc_dn ? pos - 1'b1 : pos + 1'b1;

      if (for_me && cmd.op == OP_STEPS) steps_reg <= cmd.steps;

      if (for_me && cmd.op == OP_MOVE) begin
        up        <= cmd.up;
        intensity <= cmd.intensity;
        remaining <= steps_reg;
        busy      <= (steps_reg != '0);
      end else if (busy && enc_pulse) begin
        remaining <= remaining - 1'b1;
        if (remaining == STEPS_W'(1)) busy <= 1'b0;
      end
    end
  end

  // PWM comparison against the shared counter.
  logic [PERIOD_W+8:0] prod;
  logic [PERIOD_W:0]   thr;
  logic                pwm;
  assign prod = (PERIOD_W+9)'({1'b0, pwm_period} + 1'b1) * (PERIOD_W+9)'(intensity);
  assign thr  = prod[PERIOD_W+8:8];
  assign pwm  = ({1'b0, pwm_cnt} < thr);

  always_ff @(posedge clk) begin
    if (rst) begin
      mu <= 1'b0;
      md <= 1'b0;
    end else begin
      mu <= busy &&  up && pwm;
      md <= busy && !up && pwm;
    end
  end

  // State reply: status word, then position word. Both are snapshots taken
  // when the query arrives.
  always_ff @(posedge clk) begin
    if (rst) begin
      pend_stat <= 1'b0;
      pend_pos  <= 1'b0;
      stat_word <= '0;
      pos_word  <= '0;
    end else begin
      if (for_me && cmd.op == OP_MSTATE) begin
        pend_stat <= 1'b1;
        pend_pos  <= 1'b1;
        stat_word <= rsp_mstat(ID, busy, remaining);
        pos_word  <= rsp_mpos(ID, pos[9:0]);
      end else if (rsp_valid && rsp_ready) begin
        if (pend_stat) pend_stat <= 1'b0;
        else           pend_pos  <= 1'b0;
      end
    end
  end

  assign rsp_valid = pend_stat || pend_pos;
  assign rsp_word  = pend_stat ? stat_word : pos_word;
endmodule
