// pwm_gen: PWM and direction outputs for the L298N H-bridge.
//
// A free-running counter steps through PERIOD clocks (2000 clocks, so 25 kHz
// at 50 MHz). The PWM level is high while the counter is below the duty
// command, so a duty of D gives D/PERIOD on-time; D = 0 is always off and any
// D >= PERIOD is always on. The bridge is driven as the design describes:
// ENA follows the on/off switch, and the PWM wave goes to IN1 for one
// direction and to IN2 for the other while the unused input is held low.
// Duty and direction are sampled at the start of each period so that a change
// never leaves a truncated or doubled pulse; which direction uses IN1, the
// period-boundary update and holding IN1/IN2 low while ENA is off are this
// design's choices.
//
// Timing: outputs are registered. A command presented while `period_start`
// is high appears in the period that begins on the next clock.
//
// The assertions at the end read rst_n in their disable clause; lint reports
// that as a reset used both asynchronously and synchronously. The synchronous
// use is in checking code only, not in the circuit.
module pwm_gen #(
  parameter int unsigned PERIOD = 2000,  // clocks per PWM period
  parameter int unsigned DUTY_W = 11     // width of the duty command
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,       // motor on/off
  input  logic [DUTY_W-1:0] duty,         // clocks high per period, 0..PERIOD
  input  logic              dir,          // 0: PWM on IN1, 1: PWM on IN2
  output logic              ena,          // to L298N ENA
  output logic              in1,          // to L298N IN1
  output logic              in2,          // to L298N IN2
  output logic              period_start  // high in the last clock of each period
);

  localparam int unsigned CNT_W = $clog2(PERIOD);

  logic [CNT_W-1:0]  cnt, cnt_next;
  logic [DUTY_W:0]   duty_q;   // one bit wider so that PERIOD itself fits
  logic              dir_q;
  logic              level;

  assign period_start = (cnt == CNT_W'(PERIOD - 1));
  assign cnt_next     = period_start ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
      dir_q  <= 1'b0;
    end else begin
      cnt <= cnt_next;
      if (period_start) begin
        duty_q <= (32'(duty) > PERIOD) ? (DUTY_W+1)'(PERIOD) : (DUTY_W+1)'(duty);
        dir_q  <= dir;
      end
    end
  end

  // Level for the cycle that starts after this edge.
  always_comb begin
    if (period_start) level = (32'(duty) > 0);
    else              level = (32'(cnt_next) < 32'(duty_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ena <= 1'b0;
      in1 <= 1'b0;
      in2 <= 1'b0;
    end else begin
      ena <= enable;
      in1 <= enable && level && !(period_start ? dir : dir_q);
      in2 <= enable && level &&  (period_start ? dir : dir_q);
    end
  end

  // The bridge must never see both inputs high, and nothing while disabled.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(in1 && in2));
  a_off_is_idle:      assert property (@(posedge clk) disable iff (!rst_n) !ena |-> !in1 && !in2);

endmodule
