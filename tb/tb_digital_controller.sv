// Self-checking testbench for digital_controller (ADC error generator, PID
// compensator and DPWM together).
//
// The testbench closes the loop through its own, deliberately simple plant:
// once per switching period, in mid-period, the output moves an eighth of
// the way towards Vg * duty/256. An independent model of the controller
// (8-bit codes V/37, hysteresis window +/-7 / +/-4, PID with coefficients
// 6508/256, -12447/256, 6195/256 and rails 0..16383) predicts e(n), d(n) and
// the pulse width of every period. Checked per period: e one tick after
// the period start, d one tick later, the pulse width the period after, and
// the number of high-side ticks. A reference step exercises both error
// windows.
module tb_digital_controller;
  import buck_pkg::*;

  localparam int TICKS = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [V_W-1:0] vref = V_W'(2800), vout = V_W'(2000);
  logic pwm_hs, pwm_ls, period_start, e_valid, d_valid, sat_hi, sat_lo;
  logic [7:0] lval1, lval2, duty;
  logic signed [8:0] c0;
  logic signed [3:0] e;
  win_mode_e mode;
  logic [13:0] d;

  int checks = 0, failures = 0;
  int n_fine = 0, n_coarse = 0, n_clip = 0;

  digital_controller dut (
    .clk, .rst_n, .vref, .vout, .pwm_hs, .pwm_ls, .period_start,
    .lval1, .lval2, .c0, .e, .e_valid, .mode, .d, .duty, .d_valid,
    .sat_hi, .sat_lo
  );

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (3000 * TICKS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int code(int v);
    if (v < 0) return 0;
    if (v / 37 > 255) return 255;
    return v / 37;
  endfunction

  // Controller model state.
  longint m_acc = 0;
  int m_e1 = 0, m_e2 = 0, m_cnt = 0;
  bit m_fine = 1'b0;
  int m_width = 0;      // pulse width of the current period
  int m_next_width = 0; // pulse width of the next period

  initial begin
    int raw, mag, lim, ev, hi_cnt;
    longint s;
    bit was_fine;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // first period starts at the release of reset (tick 0 is in progress)
    for (int p = 0; p < 2000; p++) begin
      if (p == 700) vref = V_W'(1500);
      if (p == 1300) vref = V_W'(3300);
      // tick 0: the controller samples vout now (period_start high)
      if (p > 0) begin
        @(negedge clk);
      end
      check("period_start", int'(period_start), 1);
      check("duty in use", int'(duty), m_width);
      // model the sample
      raw = code(int'(vref)) - code(int'(vout));
      mag = raw < 0 ? -raw : raw;
      was_fine = m_fine;
      if (mag > 7) begin m_fine = 1'b0; m_cnt = 0; end
      else if (mag <= 4) begin
        if (m_cnt < 8) m_cnt++;
        if (m_cnt >= 8) m_fine = 1'b1;
      end else m_cnt = 0;
      if (m_fine && !was_fine) n_fine++;
      if (!m_fine && was_fine) n_coarse++;
      lim = m_fine ? 4 : 7;
      ev = raw > lim ? lim : (raw < -lim ? -lim : raw);
      if (ev != raw) n_clip++;
      s = m_acc + 6508 * ev - 12447 * m_e1 + 6195 * m_e2;
      m_acc = s > (longint'(16383) << 8) ? (longint'(16383) << 8) : (s < 0 ? 0 : s);
      m_e2 = m_e1;
      m_e1 = ev;
      m_next_width = int'(m_acc >> 14);
      hi_cnt = int'(pwm_hs);
      // tick 1: error registered
      @(negedge clk);
      check("e_valid at tick 1", int'(e_valid), 1);
      check("c0", int'(c0), raw);
      check("e", int'(e), ev);
      check("mode", int'(mode), int'(m_fine));
      hi_cnt += int'(pwm_hs);
      // tick 2: command registered
      @(negedge clk);
      check("d_valid at tick 2", int'(d_valid), 1);
      check("d", int'(d), int'(m_acc >> 8));
      hi_cnt += int'(pwm_hs);
      // rest of the period; the plant moves in mid-period
      for (int t = 3; t < TICKS; t++) begin
        @(negedge clk);
        hi_cnt += int'(pwm_hs);
        if (e_valid || d_valid) begin
          failures++;
          $display("FAIL extra valid pulse at tick %0d", t);
        end
        if (t == TICKS / 2)
          vout = V_W'(int'(vout) + (5000 * m_width / TICKS - int'(vout)) / 8);
      end
      check("high-side ticks", hi_cnt, m_width);
      m_width = m_next_width;
    end
    check("fine window entered", int'(n_fine > 0), 1);
    check("coarse window re-entered", int'(n_coarse > 0), 1);
    check("error clipped", int'(n_clip > 0), 1);
    $display("fine=%0d coarse=%0d clipped=%0d final vout=%0d", n_fine, n_coarse, n_clip, vout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
