// tb_pid_error_history -- checks the e[n], e[n-1], e[n-2] delay line.
//
// Random 4-bit error codes (including codes outside -4..+4) are presented
// with random sample strobes.  A reference model limits each sampled code
// to -4..+4 and shifts it through three registers; the outputs must match
// it after every clock edge, and `limited` must flag out-of-window codes.
module tb_pid_error_history;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  int n_limited = 0;

  logic clk = 1'b0, rst_n = 1'b1, sample = 1'b0;
  logic signed [3:0] e_in = '0;
  logic signed [3:0] e0, e1, e2;
  logic limited;

  pid_error_history #(.E_W(4), .E_MAX(4)) dut (.*);

  always #5 clk = ~clk;

  int m0 = 0, m1 = 0, m2 = 0;

  function automatic int lim4(int v);
    return (v > 4) ? 4 : (v < -4) ? -4 : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int v;
      v      = int'($urandom_range(0, 15)) - 8;
      e_in   = 4'(v);
      sample = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (limited != (v > 4 || v < -4)) begin
        failures++;
        $display("FAIL limited v=%0d", v);
      end
      if (limited) n_limited++;
      @(posedge clk);
      if (sample) begin
        m2 = m1; m1 = m0; m0 = lim4(v);
      end
      #1;
      checks++;
      if (int'(e0) != m0 || int'(e1) != m1 || int'(e2) != m2) begin
        failures++;
        $display("FAIL i=%0d got %0d %0d %0d want %0d %0d %0d", i, e0, e1, e2, m0, m1, m2);
      end
    end
    checks++;
    if (n_limited == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
