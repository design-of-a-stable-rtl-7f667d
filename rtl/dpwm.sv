// Counter-comparator digital pulse width modulator.
//
// A free-running PWM_W-bit counter divides the switching period Ts into
// 2^PWM_W clock ticks (256 ticks, so a 256 MHz clock for the 1 MHz switching
// frequency). The duty word d(n) is D_W bits wide; its upper PWM_W bits are
// loaded into the compare register on the last tick of each period, so a new
// command only ever takes effect at a period boundary. The high-side gate
// d(t) (`pwm_hs`, switch SW1) is high for the first `duty` ticks of the
// period and the low-side gate (`pwm_ls`, synchronous switch SW2) is its
// complement. Both gates are flip-flop outputs: the set at the period start
// and the reset at the compare match are single clock edges, never
// overlapping pulses. Dead time is not modelled.
//
// Counter-comparator structure, truncation of d(n) to PWM_W bits and
// complementary gates are this design's choices; the modulator is only
// specified by what it does.
//
// Timing: `period_start` is high during tick 0 of every period (the first
// tick after reset is tick 0). `duty` shows the pulse width in use. A duty
// word present on `d` during the last tick of period k sets the pulse width
// of period k+1. A duty of 0 keeps SW1 off for the whole period; the widest
// pulse is 2^PWM_W - 1 ticks. The low D_W - PWM_W bits of d are ignored.
module dpwm #(
  parameter int unsigned D_W   = 14,
  parameter int unsigned PWM_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [D_W-1:0]   d,
  output logic             pwm_hs,
  output logic             pwm_ls,
  output logic             period_start,
  output logic [PWM_W-1:0] duty
);

  logic [PWM_W-1:0] cnt, cnt_n, duty_n;

  always_comb begin
    cnt_n  = cnt + 1'b1;
    duty_n = (cnt == '1) ? d[D_W-1 -: PWM_W] : duty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      duty         <= '0;
      pwm_hs       <= 1'b0;
      pwm_ls       <= 1'b0;
      period_start <= 1'b1;
    end else begin
      cnt          <= cnt_n;
      duty         <= duty_n;
      pwm_hs       <= cnt_n < duty_n;
      pwm_ls       <= !(cnt_n < duty_n);
      period_start <= cnt_n == '0;
    end
  end

  // The two switches are never on together.
  assert property (@(posedge clk) disable iff (!rst_n) !(pwm_hs && pwm_ls));

endmodule
