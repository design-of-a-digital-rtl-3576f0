// dpwm -- counter-comparator digital pulse width modulator.
//
// Turns the N_PWM-bit duty command d[n] into the switch drive d(t) at the
// switching frequency.  A free-running N_PWM-bit counter, clocked by
// clk_pwm at 2**N_PWM times the switching frequency (256 MHz for 8 bits at
// 1 MHz), defines the period.  The command is taken into a shadow register
// when the counter wraps to zero, so each period uses one stable value;
// pwm is high while the counter is below it.  A command of k gives a high
// time of k/2**N_PWM of the period (0 gives a switch that stays off).
//
// The 8-bit resolution and the 1 MHz switching frequency follow the
// design example; the counter-comparator structure is the simplest circuit
// with that function and is this implementation's choice (an integrated
// controller at these rates would normally use a delay-line or hybrid
// modulator instead of a 256 MHz counter).
//
// clk_pwm must come from the same source as the regulator clock, with the
// counter wrap lined up with the regulator's period start; the regulator
// changes `duty` only in the middle of a period, far from the wrap, so the
// multi-bit command is stable where it is sampled.  period_start is high
// for the clk_pwm cycle in which the counter is zero.
module dpwm #(
  parameter int unsigned N_PWM = pid_pkg::N_PWM
) (
  input  logic             clk_pwm,
  input  logic             rst_n,
  input  logic [N_PWM-1:0] duty,
  output logic             pwm,
  output logic             period_start
);

  logic [N_PWM-1:0] cnt;
  logic [N_PWM-1:0] duty_q;

  always_ff @(posedge clk_pwm or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) begin
        duty_q <= duty;
        pwm    <= (duty != '0);
      end else begin
        pwm    <= (cnt + 1'b1) < duty_q;
      end
    end
  end

  assign period_start = (cnt == '0);

endmodule
