// pid_lut -- one coefficient look-up table of the PID regulator.
//
// Replaces a multiplier: the table holds COEF * e for every error level
// e = -E_MAX..+E_MAX, so that the product is read out instead of computed.
// The error code, a signed number, is turned into the address e + E_MAX
// (0..2*E_MAX).  For the design example this is nine words per table.
//
// The contents are fixed when the design is elaborated from the parameters
// (COEF is the coefficient scaled by 2**FRAC_BITS, see pid_pkg), giving a
// read-only table of NWORDS x W bits.  The read is combinational.
//
// Ports
//   e     signed error code, expected within -E_MAX..+E_MAX
//   word  COEF * e, signed, W bits
module pid_lut #(
  parameter int unsigned E_W   = pid_pkg::E_W,
  parameter int unsigned E_MAX = pid_pkg::E_MAX,
  parameter int unsigned W     = pid_pkg::LUT_A_W,
  parameter int          COEF  = pid_pkg::COEF_A
) (
  input  logic signed [E_W-1:0] e,
  output logic signed [W-1:0]   word
);

  localparam int unsigned NWORDS = 2 * E_MAX + 1;
  localparam int unsigned AW     = $clog2(NWORDS);

  // The largest entry must fit in a W-bit signed word.
  localparam int MAX_ABS = (COEF < 0 ? -COEF : COEF) * int'(E_MAX);
  if (MAX_ABS > (2 ** (W - 1)) - 1) begin : g_width_check
    $error("pid_lut: COEF * E_MAX does not fit in W bits");
  end

  logic signed [W-1:0] rom [NWORDS];

  for (genvar k = 0; k < NWORDS; k++) begin : g_rom
    assign rom[k] = W'(COEF * (k - int'(E_MAX)));
  end

  logic [AW-1:0] addr;

  always_comb begin
    addr = AW'(int'(e) + int'(E_MAX));
    word = rom[addr];
  end

endmodule
