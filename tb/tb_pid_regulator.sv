// tb_pid_regulator -- checks the look-up-table PID regulator against the
// control law of the design example.
//
// The testbench issues the per-period schedule itself (sample + LOAD,
// ADD_C, ADD_B, ADD_A, STORE, then three idle cycles: 8 cycles per period)
// and keeps a reference model in real arithmetic:
//     d[n] = limit(d[n-1] + 12.5 (e[n] - 1.88 e[n-1] + 0.92 e[n-2]), 0, 255.5)
// with e limited to -4..+4.  Three phases:
//   1. soft start: error code +7 (outside the window) for 40 periods; after
//      the first two periods the duty ratio must rise by exactly 2 per period;
//   2. random error codes, covering both limits of the duty ratio;
//   3. latency: d[n] is written on the 4th clock edge after the sampling
//      edge, so d_valid is first seen high after the 5th.
module tb_pid_regulator;
  timeunit 1ns; timeprecision 1ps;
  import pid_pkg::*;

  int checks = 0, failures = 0;
  int n_limited = 0, n_hi = 0, n_lo = 0;

  logic clk = 1'b0, rst_n = 1'b1, sample = 1'b0;
  step_e step = STEP_IDLE;
  logic signed [3:0] e_in = '0;
  logic [7:0] d_out;
  logic d_valid;
  logic signed [9:0] d_prev;
  logic e_limited, sat_hi, sat_lo;

  pid_regulator dut (.*);

  always #62.5 clk = ~clk;

  real m_d = 0.0;
  int  m_e0 = 0, m_e1 = 0, m_e2 = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One switching period with error code `code`; returns the cycles from
  // the sampling edge to the first cycle with d_valid high.
  task automatic period(int code, output int latency);
    step_e sched [8] = '{STEP_LOAD, STEP_ADD_C, STEP_ADD_B, STEP_ADD_A,
                         STEP_STORE, STEP_IDLE, STEP_IDLE, STEP_IDLE};
    real nd;
    latency = -1;
    e_in = 4'(code);
    for (int c = 0; c < 8; c++) begin
      step   = sched[c];
      sample = (c == 0);
      @(posedge clk); #1;
      if (d_valid && latency < 0) latency = c + 1;
    end
    sample = 1'b0;
    step   = STEP_IDLE;
    m_e2 = m_e1; m_e1 = m_e0;
    m_e0 = (code > 4) ? 4 : (code < -4) ? -4 : code;
    nd = m_d + 12.5 * (m_e0 - 1.88 * m_e1 + 0.92 * m_e2);
    if (nd > 255.5) begin nd = 255.5; n_hi++; end
    if (nd < 0.0)   begin nd = 0.0;   n_lo++; end
    // With integer errors the exact result is a multiple of 0.5; snap to it
    // so that floating-point residue does not move the integer part.
    m_d = real'(int'(nd * 2.0)) / 2.0;
    checks++;
    if (int'(d_prev) != int'(m_d * 2.0) || int'(d_out) != int'($floor(m_d))) begin
      failures++;
      $display("FAIL code=%0d d_out=%0d d_prev=%0d want %f", code, d_out, d_prev, m_d);
    end
  endtask

  initial begin
    int lat;
    int last;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. soft start
    last = 0;
    for (int p = 0; p < 40; p++) begin
      period(7, lat);
      if (e_limited) n_limited++;
      if (p >= 2) begin
        checks++;
        if (int'(d_prev) - last != 4) begin
          failures++;
          $display("FAIL soft start step %0d", int'(d_prev) - last);
        end
      end
      last = int'(d_prev);
    end
    checks++;
    if (d_out != 8'd82) begin   // 50, then 50 - 44 = 6, then +2 per period: 6 + 2*38 = 82
      failures++;
      $display("FAIL soft start end d_out=%0d", d_out);
    end

    // 2. random codes, biased runs to reach both limits
    for (int p = 0; p < 3000; p++) begin
      int code;
      if (p % 400 < 100)      code = int'($urandom_range(2, 7));
      else if (p % 400 < 200) code = -int'($urandom_range(2, 8));
      else                    code = int'($urandom_range(0, 15)) - 8;
      period(code, lat);
      // 3. latency
      checks++;
      if (lat != 5) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
    end
    checks++;
    if (n_limited == 0 || n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL not exercised: limited=%0d hi=%0d lo=%0d", n_limited, n_hi, n_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
