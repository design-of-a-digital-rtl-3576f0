// pid_error_history -- the error delay line e[n], e[n-1], e[n-2].
//
// On every `sample` strobe (once per switching period) the new error code
// from the A/D converter enters e[n] and the older values move down to
// e[n-1] and e[n-2].  The three registers address the three coefficient
// look-up tables.
//
// The incoming code is first limited to -E_MAX..+E_MAX.  The converter's
// window covers only nine levels around the reference, so during start-up
// the error sits at its limit and the duty ratio ramps at a fixed rate: a
// built-in soft start.  The limiter makes sure that any code from the A/D
// converter addresses a valid table word.  `limited` is high while the
// input code is outside the window (it is an observation output).
//
// Timing: one register stage; values change on the clock edge that sees
// `sample` high.  Reset clears all three to zero (no error).
module pid_error_history #(
  parameter int unsigned E_W   = pid_pkg::E_W,
  parameter int unsigned E_MAX = pid_pkg::E_MAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample,
  input  logic signed [E_W-1:0] e_in,
  output logic signed [E_W-1:0] e0,      // e[n]
  output logic signed [E_W-1:0] e1,      // e[n-1]
  output logic signed [E_W-1:0] e2,      // e[n-2]
  output logic                  limited
);

  localparam logic signed [E_W-1:0] EPOS = E_W'(E_MAX);
  localparam logic signed [E_W-1:0] ENEG = -E_W'(E_MAX);

  logic signed [E_W-1:0] e_lim;

  always_comb begin
    limited = 1'b1;
    if (e_in > EPOS)      e_lim = EPOS;
    else if (e_in < ENEG) e_lim = ENEG;
    else begin
      e_lim   = e_in;
      limited = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e0 <= '0;
      e1 <= '0;
      e2 <= '0;
    end else if (sample) begin
      e0 <= e_lim;
      e1 <= e0;
      e2 <= e1;
    end
  end

endmodule
