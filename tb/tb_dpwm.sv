// Self-checking testbench for dpwm.
//
// Changes the duty word d at random times (including in the middle of a
// period and on the last tick of a period) and checks, per switching period:
// the period is exactly 256 ticks, `period_start` marks its first tick, the
// high-side gate is high for exactly floor(d/32) ticks at the start of the
// period, where d is the word present on the last tick of the previous
// period, and the low-side gate is always the complement. Duty words of 0
// and the maximum are included.
module tb_dpwm;

  localparam int D_W = 14;
  localparam int PWM_W = 8;
  localparam int TICKS = 1 << PWM_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [D_W-1:0] d = '0;
  logic pwm_hs, pwm_ls, period_start;
  logic [PWM_W-1:0] duty;

  int checks = 0, failures = 0;

  dpwm dut (.clk, .rst_n, .d, .pwm_hs, .pwm_ls, .period_start, .duty);

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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

  // Stimulus: a new random duty word every few dozen ticks.
  initial begin
    int k = 0;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #1;
      k++;
      if (k % 37 == 0 || $urandom_range(0, 63) == 0) begin
        case ($urandom_range(0, 7))
          0: d = '0;
          1: d = '1;
          2: d = D_W'(31);
          default: d = D_W'($urandom);
        endcase
      end
    end
  end

  // Checker: sample every tick at the negative edge.
  int tick = 0;
  int width = 0;
  int exp_width = 0;
  int next_width = 0;
  int periods = 0;
  bit started = 1'b0;
  bit known = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    forever begin
      @(negedge clk);
      check("complementary gates", int'(pwm_ls), int'(!pwm_hs));
      if (period_start) begin
        if (started) begin
          check("period length", tick, TICKS);
          if (known) check("pulse width", width, exp_width);
          periods++;
          known = 1'b1;
        end
        started = 1'b1;
        exp_width = next_width;
        if (known) check("duty register", int'(duty), exp_width);
        tick = 0;
        width = 0;
      end
      if (started) begin
        // pulse must be one block at the start of the period
        if (known) check("pulse shape", int'(pwm_hs), int'(tick < exp_width));
        if (pwm_hs) width++;
        tick++;
        // the word present on the last tick sets the next period
        if (tick == TICKS) next_width = int'(d >> (D_W - PWM_W));
      end
      if (periods == 300) begin
        $display("periods=%0d", periods);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
