// tb_dpwm -- checks the counter-comparator DPWM.
//
// For a series of duty commands (0, 1, 128, 254, 255 and random values) the
// number of clk_pwm cycles with pwm high in each 256-cycle period must
// equal the command in force at the start of that period, and the pulse
// must start at the period start.  The command is changed in the middle of
// a period to check that it takes effect only from the next period.
module tb_dpwm;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic clk_pwm = 1'b0, rst_n = 1'b1;
  logic [7:0] duty = '0;
  logic pwm, period_start;

  dpwm #(.N_PWM(8)) dut (.*);

  always #2 clk_pwm = ~clk_pwm;

  initial begin
    repeat (200000) @(posedge clk_pwm);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fixed [5] = '{0, 1, 128, 254, 255};
    int cur;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk_pwm);
    #1 rst_n = 1'b1;
    // rst_n released: the counter is at zero and the first period runs
    // with the reset command 0.
    cur = 0;
    for (int p = 0; p < 300; p++) begin
      int high, first_high, next;
      high       = 0;
      first_high = -1;
      next       = (p < 5) ? fixed[p] : int'($urandom_range(0, 255));
      checks++;
      if (!period_start) begin
        failures++;
        $display("FAIL period_start missing p=%0d", p);
      end
      for (int c = 0; c < 256; c++) begin
        if (c == 100) duty = 8'(next);      // mid-period change
        if (pwm) begin
          high++;
          if (first_high < 0) first_high = c;
        end
        @(posedge clk_pwm); #1;
      end
      checks++;
      if (high != cur || (cur != 0 && first_high != 0)) begin
        failures++;
        $display("FAIL p=%0d high=%0d want=%0d first=%0d", p, high, cur, first_high);
      end
      cur = next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
