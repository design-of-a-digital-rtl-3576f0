// pid_regulator -- PID regulator built from look-up tables.
//
// Implements the discrete-time PID control law
//     d[n] = d[n-1] + a*e[n] + b*e[n-1] + c*e[n-2]
// without multipliers.  Because a working feedback loop keeps the error
// small (nine levels), each product coefficient*error is read from a small
// pre-computed table addressed by the error value.  The duty ratio itself
// varies widely and is never multiplied: it is only fed back through the
// d[n-1] register.
//
// Structure: pid_error_history (e[n], e[n-1], e[n-2]) -> three pid_lut
// tables (a: 9 x 8 bit, b: 9 x 9 bit, c: 9 x 8 bit, 225 bits in all) ->
// operand multiplexer -> pid_accumulator (one adder, accumulator, d[n-1]
// and d[n] registers).  The external pid_sequencer supplies `sample` and
// the `step` that selects which table word is added in each cycle.
//
// Coefficients default to the design example, d[n] = d[n-1] +
// 12.5*(e[n] - 1.88 e[n-1] + 0.92 e[n-2]), held with one fractional bit.
// e_in is the A/D code, positive when the output voltage is below the
// reference.  d_out is the 8-bit DPWM command (high for d_out/256 of the
// period with the dpwm module of this design).
module pid_regulator #(
  parameter int unsigned E_W     = pid_pkg::E_W,
  parameter int unsigned E_MAX   = pid_pkg::E_MAX,
  parameter int unsigned FRAC    = pid_pkg::FRAC_BITS,
  parameter int          COEF_A  = pid_pkg::COEF_A,
  parameter int          COEF_B  = pid_pkg::COEF_B,
  parameter int          COEF_C  = pid_pkg::COEF_C,
  parameter int unsigned LUT_A_W = pid_pkg::LUT_A_W,
  parameter int unsigned LUT_B_W = pid_pkg::LUT_B_W,
  parameter int unsigned LUT_C_W = pid_pkg::LUT_C_W,
  parameter int unsigned ACC_W   = pid_pkg::ACC_W,
  parameter int unsigned D_W     = pid_pkg::D_W,
  parameter int unsigned N_PWM   = pid_pkg::N_PWM
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample,
  input  pid_pkg::step_e        step,
  input  logic signed [E_W-1:0] e_in,
  output logic [N_PWM-1:0]      d_out,
  output logic                  d_valid,
  output logic signed [D_W-1:0] d_prev,
  output logic                  e_limited,
  output logic                  sat_hi,
  output logic                  sat_lo
);

  logic signed [E_W-1:0]     e0, e1, e2;
  logic signed [LUT_A_W-1:0] ae;
  logic signed [LUT_B_W-1:0] be;
  logic signed [LUT_C_W-1:0] ce;
  logic signed [ACC_W-1:0]   operand;

  pid_error_history #(.E_W(E_W), .E_MAX(E_MAX)) u_hist (
    .clk, .rst_n, .sample, .e_in,
    .e0, .e1, .e2, .limited(e_limited)
  );

  pid_lut #(.E_W(E_W), .E_MAX(E_MAX), .W(LUT_A_W), .COEF(COEF_A)) u_lut_a (.e(e0), .word(ae));
  pid_lut #(.E_W(E_W), .E_MAX(E_MAX), .W(LUT_B_W), .COEF(COEF_B)) u_lut_b (.e(e1), .word(be));
  pid_lut #(.E_W(E_W), .E_MAX(E_MAX), .W(LUT_C_W), .COEF(COEF_C)) u_lut_c (.e(e2), .word(ce));

  // Operand multiplexer: the table word for the current step, sign-extended.
  always_comb begin
    unique case (step)
      pid_pkg::STEP_ADD_A: operand = ACC_W'(ae);
      pid_pkg::STEP_ADD_B: operand = ACC_W'(be);
      pid_pkg::STEP_ADD_C: operand = ACC_W'(ce);
      default:             operand = '0;
    endcase
  end

  pid_accumulator #(.ACC_W(ACC_W), .D_W(D_W), .N_PWM(N_PWM), .FRAC(FRAC)) u_acc (
    .clk, .rst_n, .step, .operand,
    .d_prev, .d_out, .d_valid, .sat_hi, .sat_lo
  );

endmodule
