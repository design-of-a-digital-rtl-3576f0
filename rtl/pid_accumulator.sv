// pid_accumulator -- the single adder and accumulator of the regulator.
//
// The new duty ratio d[n] = d[n-1] + a*e[n] + b*e[n-1] + c*e[n-2] is built
// up over several system clock cycles with one adder, under control of the
// sequencer (`step`):
//   STEP_LOAD   acc <= d[n-1]
//   STEP_ADD_*  acc <= acc + operand   (one table word per step)
//   STEP_STORE  d[n-1] <= limit(acc); d_out <= integer part of it
// All values carry FRAC_BITS fractional bits.  The stored previous value
// keeps the fractional bit; the DPWM command d_out is the integer part.
//
// The limit to 0 .. 2**N_PWM - 2**-FRAC_BITS keeps d[n-1] inside what the
// DPWM can produce, so the integrating regulator cannot wind up or wrap.
// This limit is this implementation's choice; the operating point of the
// design example never reaches it.  sat_hi / sat_lo pulse for one cycle
// with the store when the limit acted.
//
// Timing: d_out and d_prev change on the clock edge with STEP_STORE, and
// d_valid is high for the following cycle.  Reset clears everything to
// zero, so the converter starts from zero duty ratio.
module pid_accumulator #(
  parameter int unsigned ACC_W   = pid_pkg::ACC_W,
  parameter int unsigned D_W     = pid_pkg::D_W,
  parameter int unsigned N_PWM   = pid_pkg::N_PWM,
  parameter int unsigned FRAC    = pid_pkg::FRAC_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  pid_pkg::step_e          step,
  input  logic signed [ACC_W-1:0] operand,
  output logic signed [D_W-1:0]   d_prev,   // d[n-1], fixed point
  output logic [N_PWM-1:0]        d_out,    // d[n] to the DPWM, integer
  output logic                    d_valid,
  output logic                    sat_hi,
  output logic                    sat_lo
);

  localparam logic signed [ACC_W-1:0] DMAX = ACC_W'((2 ** (N_PWM + FRAC)) - 1);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] lim;      // always 0..DMAX, so its sign bit is 0
  logic                    lim_hi, lim_lo;

  // The one adder.
  assign sum = acc + operand;

  always_comb begin
    lim_hi = acc > DMAX;
    lim_lo = acc < 0;
    if (lim_hi)      lim = DMAX;
    else if (lim_lo) lim = '0;
    else             lim = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      d_prev  <= '0;
      d_out   <= '0;
      d_valid <= 1'b0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
      unique case (step)
        pid_pkg::STEP_LOAD:  acc <= ACC_W'(d_prev);
        pid_pkg::STEP_ADD_C,
        pid_pkg::STEP_ADD_B,
        pid_pkg::STEP_ADD_A: acc <= sum;
        pid_pkg::STEP_STORE: begin
          d_prev  <= D_W'(lim);
          d_out   <= lim[FRAC +: N_PWM];
          d_valid <= 1'b1;
          sat_hi  <= lim_hi;
          sat_lo  <= lim_lo;
        end
        default: ;
      endcase
    end
  end

endmodule
