// Self-checking testbench for the buck_converter model, run open loop.
//
// The testbench drives the two gates itself with a fixed-duty PWM and checks:
//  1. the first 3000 ticks exactly against an integer reference model of the
//     Euler update written here with 64-bit arithmetic;
//  2. the averaged steady state for several duty ratios: after 2500
//     switching periods the output, averaged over a period, must be within
//     30 mV of Vg*D (ideal lossless buck) and the mean inductor current
//     within 30 mA of V/R;
//  3. discontinuous conduction: with both switches open the inductor current
//     falls to zero, stays there (never reverses) and the output then decays
//     through the load only.
module tb_buck_converter;
  import buck_pkg::*;

  localparam int TICKS = 256;
  localparam int F = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [V_W-1:0] vg = V_W'(5000);
  logic sw1 = 1'b0, sw2 = 1'b0;
  logic signed [V_W-1:0] vout, il;

  int checks = 0, failures = 0;
  int duty = 128;
  bit pwm_on = 1'b0;
  int tick = 0;

  buck_converter dut (.clk, .rst_n, .vg, .sw1, .sw2, .vout, .il);

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Testbench PWM: gates change just after a rising edge.
  always @(posedge clk) begin
    #1;
    if (pwm_on) begin
      sw1 = tick < duty;
      sw2 = !(tick < duty);
      tick = (tick + 1) % TICKS;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_near(string what, longint got, longint exp, longint tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d +/- %0d", what, got, exp, tol);
    end
  endtask

  // Truncating division as the hardware does it.
  function automatic longint tdiv(longint a, longint b);
    return a / b;
  endfunction

  initial begin
    longint m_il, m_v, vx;
    longint sum_v, sum_i;
    int duties[4] = '{64, 128, 143, 230};
    repeat (3) @(posedge clk);
    @(negedge clk);
    check("vout after reset", longint'(vout), 2000);
    check("il after reset", longint'(il), 1);

    // 1. exact trajectory for the first ticks at 56 % duty
    duty = 143;
    tick = 0;
    pwm_on = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    m_il = longint'(1) <<< F;
    m_v = longint'(2000) <<< F;
    for (int i = 0; i < 3000; i++) begin
      // gate value seen by the coming rising edge
      vx = sw1 ? (longint'(5000) <<< F) : 0;
      m_il = m_il + tdiv(vx - m_v, 46 * TICKS);
      m_v = m_v + tdiv(m_il - m_v, 48 * TICKS);
      @(negedge clk);
      check("trajectory v", longint'(vout), m_v >>> F);
      check("trajectory il", longint'(il), m_il >>> F);
    end

    // 2. averaged steady state
    foreach (duties[k]) begin
      duty = duties[k];
      repeat (2500 * TICKS) @(posedge clk);
      sum_v = 0;
      sum_i = 0;
      for (int i = 0; i < TICKS; i++) begin
        @(negedge clk);
        sum_v += longint'(vout);
        sum_i += longint'(il);
      end
      $display("duty %0d/256: mean V=%0d mV mean IL=%0d mA", duty, sum_v / TICKS, sum_i / TICKS);
      check_near("steady V", sum_v / TICKS, (5000 * duty) / TICKS, 30);
      check_near("steady IL", sum_i / TICKS, sum_v / TICKS, 30);
    end

    // 3. both switches open: diode conduction, then discontinuous mode
    @(negedge clk);
    pwm_on = 1'b0;
    sw1 = 1'b0;
    sw2 = 1'b0;
    begin
      bit reached_zero = 1'b0;
      bit reversed = 1'b0;
      int v_at_zero = 0;
      for (int i = 0; i < 200 * TICKS; i++) begin
        @(negedge clk);
        if (il < 0) reversed = 1'b1;
        if (il == 0 && !reached_zero) begin
          reached_zero = 1'b1;
          v_at_zero = int'(vout);
        end
      end
      check("current reaches zero", longint'(reached_zero), 1);
      check("current never reverses", longint'(reversed), 0);
      check("current stays zero", longint'(il), 0);
      check("output decays through load", longint'(int'(vout) < v_at_zero), 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
