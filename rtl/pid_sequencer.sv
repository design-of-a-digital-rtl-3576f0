// pid_sequencer -- time base and step controller of the regulator.
//
// The regulator runs from the system clock (8 MHz in the design example)
// and computes one new duty ratio per switching period (1 MHz), that is
// within CLK_PER_PERIOD = 8 clock cycles.  A phase counter 0..CLK_PER_PERIOD-1
// marks the period; its phases issue, in order:
//   phase 0  sample      the A/D result enters e[n]; the accumulator loads d[n-1]
//   phase 1  STEP_ADD_C  add c*e[n-2]
//   phase 2  STEP_ADD_B  add b*e[n-1]
//   phase 3  STEP_ADD_A  add a*e[n]
//   phase 4  STEP_STORE  d[n] is stored and sent to the DPWM
//   phase 5.. idle
// `period_start` is high in phase 0; it is also the A/D sampling strobe.
// The order of the additions and the phase numbers are this
// implementation's choice; the single adder with an accumulator and the
// 8 clock cycles per period follow the design example.
//
// Timing: d[n] is stored on the clock edge 4 cycles after the sampling edge
// (500 ns at 8 MHz), and the DPWM applies it from the start of the next
// period, so the processing delay is one switching period.
module pid_sequencer #(
  parameter int unsigned CLK_PER_PERIOD = pid_pkg::CLK_PER_PERIOD
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           period_start,
  output pid_pkg::step_e step
);

  localparam int unsigned PW = (CLK_PER_PERIOD > 1) ? $clog2(CLK_PER_PERIOD) : 1;

  // Five steps per period need at least five cycles.
  if (CLK_PER_PERIOD < 5) begin : g_period_check
    $error("pid_sequencer: CLK_PER_PERIOD must be at least 5");
  end

  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      phase <= '0;
    else if (phase == PW'(CLK_PER_PERIOD - 1))
      phase <= '0;
    else
      phase <= phase + 1'b1;
  end

  always_comb begin
    period_start = (phase == '0);
    unique case (phase)
      PW'(0):  step = pid_pkg::STEP_LOAD;
      PW'(1):  step = pid_pkg::STEP_ADD_C;
      PW'(2):  step = pid_pkg::STEP_ADD_B;
      PW'(3):  step = pid_pkg::STEP_ADD_A;
      PW'(4):  step = pid_pkg::STEP_STORE;
      default: step = pid_pkg::STEP_IDLE;
    endcase
  end

endmodule
