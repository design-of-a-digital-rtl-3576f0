// tb_pid_lut -- checks the three coefficient tables of the design example.
//
// For every error level e = -4..+4 the word read from each table must be
// the true coefficient (12.5, -12.5*1.88, 12.5*0.92) times e, expressed
// with one fractional bit.  The expected values are computed here in real
// arithmetic from the control law, not from the table parameters.  The
// tables are combinational, so each read is checked 1 ns after the address
// is applied.
module tb_pid_lut;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic signed [3:0] e;
  logic signed [7:0] ae;
  logic signed [8:0] be;
  logic signed [7:0] ce;

  pid_lut #(.E_W(4), .E_MAX(4), .W(8), .COEF(25))  dut_a (.e(e), .word(ae));
  pid_lut #(.E_W(4), .E_MAX(4), .W(9), .COEF(-47)) dut_b (.e(e), .word(be));
  pid_lut #(.E_W(4), .E_MAX(4), .W(8), .COEF(23))  dut_c (.e(e), .word(ce));

  localparam real KI = 12.5;

  task automatic check(string name, int got, real want_real);
    int want;
    want = int'(want_real * 2.0);   // one fractional bit
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s e=%0d got=%0d want=%0d", name, e, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -4; k <= 4; k++) begin
      e = 4'(k);
      #1;
      check("a*e[n]",   int'(ae), KI * real'(k));
      check("b*e[n-1]", int'(be), -KI * 1.88 * real'(k));
      check("c*e[n-2]", int'(ce), KI * 0.92 * real'(k));
    end
    // Table 1 total: 9 words of 8 + 9 + 8 bits.
    checks++;
    if (9 * ($bits(ae) + $bits(be) + $bits(ce)) != 225) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
