// tb_pid_sequencer -- checks the per-period step schedule.
//
// After reset the sequencer must repeat, every 8 clock cycles (one 1 MHz
// switching period at 8 MHz), the schedule LOAD, ADD_C, ADD_B, ADD_A,
// STORE, IDLE, IDLE, IDLE, with period_start high exactly in the LOAD
// cycle.  The distance between period starts is measured as well.
module tb_pid_sequencer;
  timeunit 1ns; timeprecision 1ps;
  import pid_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic period_start;
  step_e step;

  pid_sequencer #(.CLK_PER_PERIOD(8)) dut (.*);

  always #62.5 clk = ~clk;

  step_e want [8] = '{STEP_LOAD, STEP_ADD_C, STEP_ADD_B, STEP_ADD_A,
                      STEP_STORE, STEP_IDLE, STEP_IDLE, STEP_IDLE};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_start = -1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      #1;
      checks++;
      if (step != want[c % 8] || period_start != (c % 8 == 0)) begin
        failures++;
        $display("FAIL cycle %0d step=%0d start=%0b", c, step, period_start);
      end
      if (period_start) begin
        if (last_start >= 0) begin
          checks++;
          if (c - last_start != 8) begin
            failures++;
            $display("FAIL period %0d", c - last_start);
          end
        end
        last_start = c;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
