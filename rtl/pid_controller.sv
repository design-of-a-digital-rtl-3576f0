// pid_controller -- integrated digital controller for a high-frequency buck
// converter: look-up-table PID regulator and digital PWM.
//
// Once per switching period the A/D converter (outside this module) delivers
// the error code e[n] = quantised (Vref - Vout), limited to nine levels of
// one A/D LSB each.  The regulator turns it into a new duty ratio with
//     d[n] = d[n-1] + 12.5 (e[n] - 1.88 e[n-1] + 0.92 e[n-2])
// using three small tables and one adder, and the DPWM drives the power
// switch with it from the next period on.
//
// Clocks: clk is the system clock (8 MHz, CLK_PER_PERIOD = 8 cycles per
// switching period); clk_pwm is the DPWM counter clock, 2**N_PWM times the
// switching frequency, from the same source and lined up so that both
// periods start together after reset.  rst_n is an asynchronous, active
// low reset for both; it starts the converter from zero duty ratio.
//
// Interface to the A/D converter: adc_sample is high for one clk cycle at
// the start of every period; e_code must be valid at the clk edge that ends
// that cycle.  The remaining outputs are for observation: the duty command
// d_out with its d_valid strobe, the stored d[n-1] with its fractional bit, e_limited (the error is outside the
// window, as during soft start) and sat_hi / sat_lo (the duty ratio
// reached its limit).
module pid_controller #(
  parameter int unsigned E_W            = pid_pkg::E_W,
  parameter int unsigned N_PWM          = pid_pkg::N_PWM,
  parameter int unsigned CLK_PER_PERIOD = pid_pkg::CLK_PER_PERIOD
) (
  input  logic                  clk,
  input  logic                  clk_pwm,
  input  logic                  rst_n,
  input  logic signed [E_W-1:0] e_code,
  output logic                  adc_sample,
  output logic                  pwm,
  output logic                  pwm_period_start,
  output logic [N_PWM-1:0]      d_out,
  output logic signed [pid_pkg::D_W-1:0] d_prev,
  output logic                  d_valid,
  output logic                  e_limited,
  output logic                  sat_hi,
  output logic                  sat_lo
);

  pid_pkg::step_e step;

  pid_sequencer #(.CLK_PER_PERIOD(CLK_PER_PERIOD)) u_seq (
    .clk, .rst_n, .period_start(adc_sample), .step
  );

  pid_regulator #(.E_W(E_W), .N_PWM(N_PWM)) u_reg (
    .clk, .rst_n, .sample(adc_sample), .step, .e_in(e_code),
    .d_out, .d_valid, .d_prev, .e_limited, .sat_hi, .sat_lo
  );

  dpwm #(.N_PWM(N_PWM)) u_dpwm (
    .clk_pwm, .rst_n, .duty(d_out), .pwm, .period_start(pwm_period_start)
  );

endmodule
