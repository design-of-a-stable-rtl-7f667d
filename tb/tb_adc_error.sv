// Self-checking testbench for adc_error.
//
// Drives random and directed reference/output voltages, one `sample` strobe
// at a time, and compares lval1, lval2, c0, e and the window mode with a
// reference model kept in the testbench: codes are floor(V/37) clamped to
// 0..255, c0 their difference, and the window follows the hysteresis rule
// (fine after 8 consecutive samples with |c0| <= 4, coarse again as soon as
// |c0| > 7). Also checks that e_valid is a single pulse one clock after the
// strobe. Directed phases force both mode changes and every clipping case.
module tb_adc_error;
  import buck_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample = 1'b0;
  logic signed [V_W-1:0] vref = '0, vout = '0;
  logic [7:0] lval1, lval2;
  logic signed [8:0] c0;
  logic signed [3:0] e;
  logic e_valid;
  win_mode_e mode;

  int checks = 0, failures = 0;
  int n_fine_entries = 0, n_coarse_entries = 0, n_clip = 0;

  // Reference model state.
  int m_cnt = 0;
  bit m_fine = 1'b0;

  adc_error dut (
    .clk, .rst_n, .sample, .vref, .vout,
    .lval1, .lval2, .c0, .e, .e_valid, .mode
  );

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code(int v);
    if (v < 0) return 0;
    if (v / 37 > 255) return 255;
    return v / 37;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (vref=%0d vout=%0d)", what, got, exp, vref, vout);
    end
  endtask

  // Apply one sample and check the registered result.
  task automatic do_sample(int vr, int vo);
    int l1, l2, raw, mag, lim, exp_e;
    bit was_fine;
    vref = V_W'(vr);
    vout = V_W'(vo);
    @(negedge clk);
    sample = 1'b1;
    @(negedge clk);
    sample = 1'b0;
    // model
    l1 = code(vr);
    l2 = code(vo);
    raw = l1 - l2;
    mag = raw < 0 ? -raw : raw;
    was_fine = m_fine;
    if (mag > 7) begin
      m_fine = 1'b0;
      m_cnt = 0;
    end else if (mag <= 4) begin
      if (m_cnt < 8) m_cnt++;
      if (m_cnt >= 8) m_fine = 1'b1;
    end else begin
      m_cnt = 0;
    end
    if (m_fine && !was_fine) n_fine_entries++;
    if (!m_fine && was_fine) n_coarse_entries++;
    lim = m_fine ? 4 : 7;
    exp_e = raw > lim ? lim : (raw < -lim ? -lim : raw);
    if (exp_e != raw) n_clip++;
    check("e_valid", int'(e_valid), 1);
    check("lval1", int'(lval1), l1);
    check("lval2", int'(lval2), l2);
    check("c0", int'(c0), raw);
    check("e", int'(e), exp_e);
    check("mode", int'(mode), int'(m_fine));
    @(negedge clk);
    check("e_valid pulse", int'(e_valid), 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("e_valid idle", int'(e_valid), 0);
    check("mode after reset", int'(mode), 0);

    // Directed: large errors of both signs in coarse mode, saturation.
    do_sample(2800, 2000);
    do_sample(2000, 2800);
    do_sample(2800, -500);
    do_sample(12000, 0);
    // Settle: small errors for 10 samples enter fine mode.
    for (int i = 0; i < 10; i++) do_sample(2800, 2800 - 37 * (i % 5));
    // In fine mode a 6-step error is clipped to 4 and keeps the mode.
    do_sample(2800, 2800 - 37 * 6 - 10);
    do_sample(2800, 2800 + 37 * 6);
    // An 8-step error drops back to coarse.
    do_sample(2800, 2800 - 37 * 9);
    // Random phase, biased towards small errors.
    for (int i = 0; i < 3000; i++) begin
      int vr, vo;
      vr = int'($urandom_range(0, 5000));
      if ($urandom_range(0, 3) == 0) vo = int'($urandom_range(0, 6000)) - 300;
      else vo = vr + int'($urandom_range(0, 400)) - 200;
      do_sample(vr, vo);
    end

    check("fine mode entered", int'(n_fine_entries > 0), 1);
    check("coarse mode re-entered", int'(n_coarse_entries > 0), 1);
    check("error clipped", int'(n_clip > 0), 1);
    $display("fine entries=%0d coarse entries=%0d clipped=%0d", n_fine_entries, n_coarse_entries, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
