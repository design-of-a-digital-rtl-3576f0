// tb_pid_controller -- end-to-end test of the digital controller, at its
// default parameters, in a closed loop with a buck converter model.
//
// Clocks: clk_pwm has a 4 ns period here and clk (the system clock) is
// clk_pwm / 32, so one switching period is 8 clk = 256 clk_pwm cycles.  The
// converter model counts time in switching periods of Ts = 1 us (1 MHz),
// whatever the simulated clock period is.
//
// Plant (behavioural, this file): averaged buck converter with L = 1 uH,
// C = 22 uF, input 6 V and then 4 V (the ends of the 4-6 V range), winding resistance 50 mOhm, capacitor ESR 10 mOhm
// and a current-source load, integrated in 64 sub-steps per period with
// the duty ratio the DPWM really produced in that period (pwm high cycles
// / 256).  A/D model: e = round((2.7 V - Vout) / 40 mV), limited to -4..+4,
// taken at the start of each period.
//
// Checks
//   * every d_out equals a reference model of the control law
//       d[n] = limit(d[n-1] + 12.5 (e[n] - 1.88 e[n-1] + 0.92 e[n-2]), 0, 255.5)
//     and is written on the 4th clk edge after the sampling edge;
//   * every DPWM period is high for exactly the duty command in force;
//   * open loop, a negative error at zero duty holds d at 0 (low limit) and
//     a long positive error drives it to 255 (high limit);
//   * closed loop soft start: error held at its limit, duty rises by 2 LSB
//     per period, Vout reaches 2.7 V +/- 40 mV without over 5 % overshoot;
//   * load steps 0.3 A -> 1 A -> 0.3 A: deviation below 5 % of 2.7 V and
//     back inside +/- 40 mV within 50 us.
// Each mechanism (error limit, both duty limits, soft start, load steps)
// is counted; one that never happened is a failure.
module tb_pid_controller;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT
  logic clk_pwm = 1'b0, rst_n = 1'b1;
  logic clk;
  logic [4:0] div = '0;
  logic signed [3:0] e_code = '0;
  logic adc_sample, pwm, pwm_period_start, d_valid, e_limited, sat_hi, sat_lo;
  logic [7:0] d_out;
  logic signed [9:0] d_prev;

  pid_controller dut (.*);

  always #2 clk_pwm = ~clk_pwm;
  always @(posedge clk_pwm or negedge rst_n)
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  assign clk = div[4];

  // ------------------------------------------------------ plant and A/D
  localparam real TS   = 1.0e-6;
  localparam real LIND = 1.0e-6;
  localparam real CAP  = 22.0e-6;
  localparam real RDCR = 0.05;
  localparam real RESR = 0.01;
  localparam real VREF = 2.7;
  localparam real VQ   = 0.04;

  real vin = 6.0;
  real il = 0.0, vc = 0.0, iload = 0.3, vout = 0.0;
  bit  closed_loop = 1'b0;
  int  forced_e = 0;
  int  period_no = 0;

  function automatic int adc(real v);
    int q;
    q = int'((VREF - v) / VQ);
    return (q > 4) ? 4 : (q < -4) ? -4 : q;
  endfunction

  task automatic plant_step(real duty);
    real dt, vo;
    dt = TS / 64.0;
    for (int k = 0; k < 64; k++) begin
      vo = vc + RESR * (il - iload);
      il = il + (duty * vin - vo - il * RDCR) / LIND * dt;
      vc = vc + (il - iload) / CAP * dt;
    end
    vout = vc + RESR * (il - iload);
  endtask

  // DPWM measurement and plant update, once per switching period.
  int  high_cnt = 0;
  int  duty_in_force = 0;
  int  n_pwm_periods = 0;

  always @(posedge clk_pwm) begin
    if (rst_n && pwm_period_start) begin
      // The period that just ended.
      if (n_pwm_periods > 0) begin
        checks++;
        if (high_cnt != duty_in_force) begin
          failures++;
          $display("FAIL DPWM period %0d high=%0d want %0d", period_no, high_cnt, duty_in_force);
        end
        plant_step(real'(high_cnt) / 256.0);
      end
      n_pwm_periods++;
      period_no++;
      duty_in_force = int'(d_out);   // latched by the DPWM at this wrap
      high_cnt      = pwm ? 1 : 0;
      e_code       <= 4'(closed_loop ? adc(vout) : forced_e);
    end else if (rst_n) begin
      if (pwm) high_cnt++;
    end
  end

  // ------------------------------------------------ regulator reference
  real m_d = 0.0;
  int  m_e0 = 0, m_e1 = 0, m_e2 = 0;
  int  since_sample = -1;
  int  n_limited = 0, n_sat_hi = 0, n_sat_lo = 0, n_updates = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      since_sample = -1;
    end else begin
      if (since_sample >= 0) since_sample++;
      if (d_valid) begin
        checks++;
        // d_out is written on the 4th edge after the sampling edge, so
        // d_valid is seen high at the 5th.
        if (since_sample != 5) begin
          failures++;
          $display("FAIL latency %0d", since_sample);
        end
        checks++;
        if (int'(d_out) != int'($floor(m_d)) || int'(d_prev) != int'(m_d * 2.0)) begin
          failures++;
          $display("FAIL d_out=%0d d_prev=%0d want %f (e %0d %0d %0d)", d_out, d_prev, m_d, m_e0, m_e1, m_e2);
        end
        n_updates++;
      end
      if (sat_hi) n_sat_hi++;
      if (sat_lo) n_sat_lo++;
      if (adc_sample) begin
        real nd;
        int  c;
        c = int'(e_code);
        if (c > 4 || c < -4) n_limited++;
        m_e2 = m_e1; m_e1 = m_e0;
        m_e0 = (c > 4) ? 4 : (c < -4) ? -4 : c;
        nd = m_d + 12.5 * (m_e0 - 1.88 * m_e1 + 0.92 * m_e2);
        if (nd > 255.5) nd = 255.5;
        if (nd < 0.0)   nd = 0.0;
        m_d = real'(int'(nd * 2.0)) / 2.0;
        since_sample = 0;
      end
    end
  end

  int n_soft_start = 0, n_load_steps = 0;

  // ---------------------------------------------------------- helpers
  task automatic wait_periods(int n);
    repeat (n * 8) @(posedge clk);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    m_d = 0.0; m_e0 = 0; m_e1 = 0; m_e2 = 0;
    n_pwm_periods = 0;
    il = 0.0; vc = 0.0; vout = 0.0;
    #50 rst_n = 1'b1;
  endtask

  task automatic load_step(real new_load, string name);
    real vmin, vmax, dev;
    int  settle;
    iload = new_load;
    vmin = 10.0; vmax = -10.0; settle = -1;
    for (int p = 0; p < 100; p++) begin
      wait_periods(1);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
      if (vout > VREF + VQ || vout < VREF - VQ) settle = -1;
      else if (settle < 0) settle = p;
    end
    dev = (VREF - vmin > vmax - VREF) ? VREF - vmin : vmax - VREF;
    $display("%s: Vout %f .. %f V (%f %%), inside +/-40 mV after %0d us",
             name, vmin, vmax, 100.0 * dev / VREF, settle);
    checks++;
    if (dev > 0.05 * VREF || settle < 0 || settle > 50) begin
      failures++;
      $display("FAIL %s", name);
    end
  endtask

  // Soft start from reset at 0.3 A, then load steps, with input voltage v.
  task automatic closed_loop_run(real v);
    real vmax;
    int  reach, last, ramp_ok, ramp_periods;
    @(negedge clk);
    closed_loop = 1'b1;
    vin         = v;
    iload       = 0.3;
    do_reset();
    vmax = 0.0; reach = -1; ramp_ok = 1; last = 0; ramp_periods = 0;
    for (int p = 0; p < 200; p++) begin
      wait_periods(1);
      if (vout > vmax) vmax = vout;
      if (reach < 0 && vout > VREF - VQ) reach = p;
      // While the error is held at its limit the duty ratio climbs by
      // 2 LSB (4 half-LSB codes of d[n-1]) per period.
      if (m_e0 == 4 && m_e1 == 4 && m_e2 == 4) begin
        ramp_periods++;
        if (int'(d_prev) - last != 4) ramp_ok = 0;
      end
      last = int'(d_prev);
    end
    $display("soft start at %0.1f V: error at its limit for %0d periods, Vout within 40 mV of 2.7 V after %0d us, peak %f V, final %f V",
             v, ramp_periods, reach, vmax, vout);
    checks++;
    if (reach < 20 || reach > 150 || vmax > 1.05 * VREF || !ramp_ok || ramp_periods < 20 ||
        vout > VREF + VQ || vout < VREF - VQ) begin
      failures++;
      $display("FAIL soft start");
    end else n_soft_start++;

    load_step(1.0, "load step 0.3 A -> 1 A");
    n_load_steps++;
    load_step(0.3, "load step 1 A -> 0.3 A");
    n_load_steps++;
  endtask

  // ---------------------------------------------------------- watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- sequence
  initial begin
    #1  rst_n = 1'b0;
    #10 rst_n = 1'b1;

    // Open loop: low limit, then high limit.
    // (The derivative terms first throw d back up to 44; it then falls by
    // 2 per period and rests at the low limit.)
    forced_e = -4;
    wait_periods(40);
    checks++;
    if (d_out != 8'd0) begin failures++; $display("FAIL low limit d_out=%0d", d_out); end
    forced_e = 7;
    wait_periods(160);
    checks++;
    if (d_out != 8'd255) begin failures++; $display("FAIL high limit d_out=%0d", d_out); end

    // Closed loop from reset at both ends of the input range.
    closed_loop_run(6.0);
    closed_loop_run(4.0);

    // Every mechanism must have happened.
    $display("events: updates=%0d error-limited=%0d sat_hi=%0d sat_lo=%0d soft-start=%0d load-steps=%0d dpwm-periods=%0d",
             n_updates, n_limited, n_sat_hi, n_sat_lo, n_soft_start, n_load_steps, period_no);
    checks++;
    if (n_limited == 0 || n_sat_hi == 0 || n_sat_lo == 0 || n_soft_start < 2 ||
        n_load_steps < 4 || n_updates == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
