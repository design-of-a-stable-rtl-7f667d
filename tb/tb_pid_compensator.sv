// Self-checking testbench for pid_compensator.
//
// Feeds error samples in the +/-7 range (random, plus directed runs that
// drive the command into both rails) and compares d with a reference model
// of d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2). The model keeps d with 8
// fraction bits and uses a = 6508/256, b = -12447/256, c = 6195/256 (the
// tuned 25.42, -48.62, 24.2 rounded to 1/256), clamped to [0, 16383 + 255/256].
// It also checks that d_valid follows e_valid by exactly one clock, that the
// saturation pulses match the model, that the command holds between
// samples, and that a constant error e gives a steady slope of e per sample
// (a + b + c = 1).
module tb_pid_compensator;

  localparam int D_W = 14;
  localparam longint ACC_MAX = ((longint'(1) << D_W) - 1) << 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic e_valid = 1'b0;
  logic signed [3:0] e = '0;
  logic [D_W-1:0] d;
  logic d_valid, sat_hi, sat_lo;

  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0;
  longint m_acc = 0;
  int m_e1 = 0, m_e2 = 0;

  pid_compensator dut (
    .clk, .rst_n, .e_valid, .e, .d, .d_valid, .sat_hi, .sat_lo
  );

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic step(int ev, int gap);
    longint s;
    bit hi, lo;
    int d_before;
    d_before = int'(d);
    @(negedge clk);
    e = 4'(ev);
    e_valid = 1'b1;
    @(negedge clk);
    e_valid = 1'b0;
    s = m_acc + 6508 * ev - 12447 * m_e1 + 6195 * m_e2;
    hi = s > ACC_MAX;
    lo = s < 0;
    m_acc = hi ? ACC_MAX : (lo ? 0 : s);
    m_e2 = m_e1;
    m_e1 = ev;
    if (hi) n_hi++;
    if (lo) n_lo++;
    check("d_valid", longint'(d_valid), 1);
    check("d", longint'(d), m_acc >>> 8);
    check("sat_hi", longint'(sat_hi), longint'(hi));
    check("sat_lo", longint'(sat_lo), longint'(lo));
    for (int i = 0; i < gap; i++) begin
      @(negedge clk);
      check("d_valid idle", longint'(d_valid), 0);
      check("d held", longint'(d), m_acc >>> 8);
    end
  endtask

  initial begin
    int d0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("d after reset", longint'(d), 0);

    // Lift the command off the lower rail and let it settle.
    for (int i = 0; i < 20; i++) step(7, 0);
    for (int i = 0; i < 3; i++) step(0, 0);
    // A single unit error: the command first jumps by a = 25.42, then
    // settles a + b + c = 1 above where it started.
    d0 = int'(d);
    step(1, 0);
    check("impulse a", longint'((int'(d) - d0 == 25) || (int'(d) - d0 == 26)), 1);
    step(0, 0);
    step(0, 0);
    check("impulse a+b+c", longint'(d) - longint'(d0), 1);

    // Constant error: after two samples the slope is exactly e per sample.
    for (int i = 0; i < 5; i++) step(3, 1);
    d0 = int'(d);
    step(3, 1);
    check("slope of constant error", longint'(d) - longint'(d0), 3);

    // Push into the upper rail, then the lower rail.
    for (int i = 0; i < 2500; i++) step(7, 0);
    check("upper rail", longint'(d), (1 << D_W) - 1);
    for (int i = 0; i < 2500; i++) step(-7, 0);
    check("lower rail", longint'(d), 0);

    // Random errors with random gaps, around mid range.
    for (int i = 0; i < 1200; i++) step(4, 0);
    for (int i = 0; i < 5000; i++)
      step(int'($urandom_range(0, 14)) - 7, int'($urandom_range(0, 3)));

    check("upper rail reached", longint'(n_hi > 0), 1);
    check("lower rail reached", longint'(n_lo > 0), 1);
    $display("upper=%0d lower=%0d", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
