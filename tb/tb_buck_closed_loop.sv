// End-to-end testbench of buck_closed_loop at its default parameters
// (Vg = 5000 mV, L/Ts = 46, C/Ts = 48, R = 1 ohm, 37 mV ADC step, PID
// a = 25.42, b = -48.62, c = 24.2, 14-bit command, 8-bit DPWM).
//
// Runs the loop from reset (V = 2000 mV) through a sequence of reference
// settings as a voltage-scaling load would request them:
//   1000 mV for 50 periods (below the 2000 mV start, so the command runs
//   into its lower rail) -> 2800 mV (design point) -> 2200 mV -> 6000 mV
//   (above Vg: the command saturates high) -> 0 mV -> 2800 mV,
// followed by a drop of the input voltage from 5000 to 4000 mV.
// For each regulated setting the output, averaged over the last 300
// switching periods, must be within 50 mV of the reference, and the
// per-period means must stay within one ADC step (37 mV) of each other:
// a limit cycle of the loop would show up as a wider spread. Throughout, it checks that exactly one
// command is produced per 256-tick switching period, two ticks after the
// sample, and that the gates never overlap. Each mechanism of the loop must
// occur at least once: error clipping by the window, fine-window entry,
// coarse-window re-entry, upper and lower command saturation.
module tb_buck_closed_loop;
  import buck_pkg::*;

  localparam int TICKS = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [V_W-1:0] vg = V_W'(5000);
  logic signed [V_W-1:0] vref = V_W'(2800);
  logic signed [V_W-1:0] vout, il;
  logic pwm_hs, pwm_ls, period_start, e_valid, d_valid, sat_hi, sat_lo;
  logic [7:0] lval1, lval2, duty;
  logic signed [8:0] c0;
  logic signed [3:0] e;
  win_mode_e mode;
  logic [13:0] d;

  int checks = 0, failures = 0;
  int n_clip = 0, n_fine = 0, n_coarse = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_periods = 0, n_cmds = 0;

  buck_closed_loop dut (
    .clk, .rst_n, .vg, .vref, .vout, .il, .pwm_hs, .pwm_ls, .period_start,
    .lval1, .lval2, .c0, .e, .e_valid, .mode, .d, .duty, .d_valid,
    .sat_hi, .sat_lo
  );

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (20000 * TICKS) @(posedge clk);
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

  // Per-tick monitor: rate and latency of the command, gate overlap and
  // mechanism counters.
  int tick = 0;
  int per_sum = 0;
  int per_mean = 0;
  win_mode_e last_mode = WIN_COARSE;
  always @(negedge clk) begin
    if (rst_n) begin
      if (period_start) begin
        if (n_periods > 0) per_mean = per_sum / TICKS;
        per_sum = 0;
        tick = 0;
        n_periods++;
      end
      per_sum += int'(vout);
      if (pwm_hs && pwm_ls) begin
        failures++;
        $display("FAIL gates overlap at %0t", $time);
      end
      if (e_valid && tick != 1) begin
        failures++;
        $display("FAIL e_valid at tick %0d", tick);
      end
      if (d_valid) begin
        n_cmds++;
        if (tick != 2) begin
          failures++;
          $display("FAIL d_valid at tick %0d", tick);
        end
      end
      if (e_valid) begin
        if (int'(c0) != int'(e)) n_clip++;
        if (mode == WIN_FINE && last_mode == WIN_COARSE) n_fine++;
        if (mode == WIN_COARSE && last_mode == WIN_FINE) n_coarse++;
        last_mode = mode;
      end
      if (sat_hi) n_sat_hi++;
      if (sat_lo) n_sat_lo++;
      tick++;
    end
  end

  // Run n switching periods.
  task automatic run_periods(int n);
    repeat (n * TICKS) @(negedge clk);
  endtask

  // Hold a reference, let the loop settle, then check the regulation.
  task automatic regulate(int mv, int settle);
    longint sum;
    int lo, hi, mean, t_in;
    vref = V_W'(mv);
    // settling time: last period whose mean is more than one ADC step off
    t_in = 0;
    for (int p = 0; p < settle; p++) begin
      run_periods(1);
      if (per_mean > mv + 37 || per_mean < mv - 37) t_in = p + 1;
    end
    checks++;
    if (t_in >= settle) begin
      failures++;
      $display("FAIL no settling within %0d periods for reference %0d", settle, mv);
    end
    sum = 0;
    lo = 100000;
    hi = -100000;
    for (int p = 0; p < 300; p++) begin
      run_periods(1);
      sum += per_mean;
      if (per_mean < lo) lo = per_mean;
      if (per_mean > hi) hi = per_mean;
    end
    mean = int'(sum / 300);
    $display("vref=%0d mV, vg=%0d mV: within 37 mV after %0d periods; mean %0d mV, period means %0d..%0d mV, d=%0d, IL=%0d mA",
             mv, vg, t_in, mean, lo, hi, d, il);
    checks++;
    if (mean > mv + 50 || mean < mv - 50) begin
      failures++;
      $display("FAIL mean output %0d for reference %0d", mean, mv);
    end
    checks++;
    if (hi - lo > 37) begin
      failures++;
      $display("FAIL output wanders %0d..%0d for reference %0d", lo, hi, mv);
    end
  endtask

  initial begin
    int p0, c0_cmds;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check("reset output", int'(vout), V_INIT_MV);
    rst_n = 1'b1;

    vref = V_W'(1000);
    run_periods(50);
    regulate(2800, 2500);
    regulate(2200, 2000);
    // Reference above the input voltage: the command runs into its upper rail.
    vref = V_W'(6000);
    run_periods(1500);
    check("upper rail", int'(d), 16383);
    check("full pulse", int'(duty), 255);
    // Zero reference: the output falls into the lowest ADC bin (< 37 mV).
    vref = V_W'(0);
    run_periods(2500);
    check("output near zero", int'(vout < 37 && vout >= 0), 1);
    regulate(2800, 2500);
    // Line change: the input drops to 4000 mV.
    vg = V_W'(4000);
    regulate(2800, 2000);

    // One command per switching period.
    p0 = n_periods;
    c0_cmds = n_cmds;
    run_periods(100);
    check("commands per 100 periods", n_cmds - c0_cmds, n_periods - p0);

    check("error clipped", int'(n_clip > 0), 1);
    check("fine window entered", int'(n_fine > 0), 1);
    check("coarse window re-entered", int'(n_coarse > 0), 1);
    check("upper saturation", int'(n_sat_hi > 0), 1);
    check("lower saturation", int'(n_sat_lo > 0), 1);
    $display("periods=%0d commands=%0d clipped=%0d fine=%0d coarse=%0d sat_hi=%0d sat_lo=%0d",
             n_periods, n_cmds, n_clip, n_fine, n_coarse, n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
