// tb_pid_accumulator -- checks the single-adder accumulator.
//
// Runs many periods of the step schedule LOAD, ADD, ADD, ADD, STORE with
// random signed operands in the range of the table words (including values
// large enough to push the result below zero and above the top of the
// DPWM range).  A reference model keeps d[n-1] with one fractional bit,
// limited to 0..255.5; after each STORE the registers d_prev, d_out (the
// integer part), d_valid and the saturation flags must match it.
module tb_pid_accumulator;
  timeunit 1ns; timeprecision 1ps;
  import pid_pkg::*;

  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  step_e step = STEP_IDLE;
  logic signed [10:0] operand = '0;
  logic signed [9:0]  d_prev;
  logic [7:0]         d_out;
  logic               d_valid, sat_hi, sat_lo;

  pid_accumulator #(.ACC_W(11), .D_W(10), .N_PWM(8), .FRAC(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_step(step_e s, int op);
    step    = s;
    operand = 11'(op);
    @(posedge clk);
    #1;
    step    = STEP_IDLE;
    operand = '0;
  endtask

  initial begin
    real m = 0.0;        // model of d[n-1], in duty LSBs
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 2000; p++) begin
      int ops [3];
      real sum;
      bit  hi, lo;
      // Operands as the three tables would produce them (half LSBs).
      ops[0] = 23  * (int'($urandom_range(0, 8)) - 4);
      ops[1] = -47 * (int'($urandom_range(0, 8)) - 4);
      ops[2] = 25  * (int'($urandom_range(0, 8)) - 4);
      if (p % 50 < 10) begin   // drive towards the top limit
        ops[0] = 92; ops[1] = 188; ops[2] = 100;
      end else if (p % 50 < 20) begin  // and towards zero
        ops[0] = -92; ops[1] = -188; ops[2] = -100;
      end
      do_step(STEP_LOAD, 0);
      for (int k = 0; k < 3; k++) do_step(k == 0 ? STEP_ADD_C : k == 1 ? STEP_ADD_B : STEP_ADD_A, ops[k]);
      sum = m + (ops[0] + ops[1] + ops[2]) / 2.0;
      hi = sum > 255.5;
      lo = sum < 0.0;
      m  = hi ? 255.5 : lo ? 0.0 : sum;
      do_step(STEP_STORE, 0);
      checks++;
      if (int'(d_prev) != int'(m * 2.0) || int'(d_out) != $floor(m) || !d_valid ||
          sat_hi != hi || sat_lo != lo) begin
        failures++;
        $display("FAIL p=%0d d_prev=%0d d_out=%0d valid=%0b hi=%0b lo=%0b want %f",
                 p, d_prev, d_out, d_valid, sat_hi, sat_lo, m);
      end
      if (hi) n_hi++;
      if (lo) n_lo++;
      @(posedge clk); #1;
      checks++;
      if (d_valid) begin
        failures++;
        $display("FAIL d_valid longer than one cycle");
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL limits not exercised hi=%0d lo=%0d", n_hi, n_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
