// pid_pkg -- shared constants and types of the look-up-table PID controller.
//
// The controller evaluates, once per switching period,
//     d[n] = d[n-1] + a*e[n] + b*e[n-1] + c*e[n-2]
// with a = 12.5, b = -12.5*1.88 = -23.5 and c = 12.5*0.92 = 11.5, the
// design example of a 1 MHz, 2.7 V buck converter.  All values inside the
// regulator are two's complement fixed point with FRAC_BITS fractional bits
// (one, so a value of 1 is the code 2).  The coefficients below are therefore
// the true coefficients times 2.
//
// The word lengths (8/9/8-bit tables, 10-bit d[n-1], 8-bit d[n]), the error
// range of nine levels (-4..+4), one fractional bit, the 8 MHz system clock
// and the 1 MHz switching frequency are the design example's numbers.  The
// error code width, the accumulator width and the step encoding are this
// implementation's choices.
package pid_pkg;

  // Error code from the A/D converter: nine levels, -E_MAX..+E_MAX LSBs of 40 mV.
  localparam int unsigned E_MAX = 4;
  localparam int unsigned E_W   = 4;    // signed code width, holds -8..+7

  // Fixed point: one fractional bit in the tables and in d[n-1].
  localparam int unsigned FRAC_BITS = 1;

  // Table coefficients, scaled by 2**FRAC_BITS.
  localparam int COEF_A = 25;           //  12.5
  localparam int COEF_B = -47;          // -23.5  (12.5 * 1.88)
  localparam int COEF_C = 23;           //  11.5  (12.5 * 0.92)

  // Table word lengths (including sign and fractional bit).
  localparam int unsigned LUT_A_W = 8;
  localparam int unsigned LUT_B_W = 9;
  localparam int unsigned LUT_C_W = 8;

  // Duty ratio: 8-bit DPWM command, 10-bit stored previous value.
  localparam int unsigned N_PWM = 8;
  localparam int unsigned D_W   = 10;

  // Accumulator: d[n-1] plus three table words without overflow.
  localparam int unsigned ACC_W = 11;   // 511 + 100 + 188 + 92 = 891 < 1024

  // System clock cycles per switching period (8 MHz / 1 MHz).
  localparam int unsigned CLK_PER_PERIOD = 8;

  // One step of the per-period computation, issued by the sequencer.
  typedef enum logic [2:0] {
    STEP_IDLE  = 3'd0,   // nothing happens
    STEP_LOAD  = 3'd1,   // acc <= d[n-1]
    STEP_ADD_C = 3'd2,   // acc <= acc + c*e[n-2]
    STEP_ADD_B = 3'd3,   // acc <= acc + b*e[n-1]
    STEP_ADD_A = 3'd4,   // acc <= acc + a*e[n]
    STEP_STORE = 3'd5    // d[n-1] <= d[n] <= limited acc
  } step_e;

endpackage
