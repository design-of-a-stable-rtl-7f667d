// Digital controller of the buck converter: ADC error generator, PID
// compensator and DPWM in series.
//
// Once per switching period the DPWM's `period_start` tick makes the ADC
// sample the output voltage against the reference; the limited error e(n)
// reaches the compensator one clock later, and the new discrete command d(n)
// is ready one clock after that. The DPWM loads d(n) on the last tick of the
// period, so the error sampled at the start of period k sets the pulse width
// of period k+1 (one switching period of loop delay). All sub-blocks share
// one clock, the DPWM tick clock (2^PWM_W ticks per period). The chain of
// blocks is the specified controller structure; the sampling point and the
// tick-level timing are this design's own choice.
//
// Interface: `vref` and `vout` in mV; `pwm_hs`/`pwm_ls` are the gate
// signals of the high- and low-side switches; the remaining outputs expose
// the internal loop variables (codes, raw and limited error, command, window
// mode, the pulse width in use and saturation pulses) for observation.
module digital_controller
  import buck_pkg::*;
#(
  parameter int unsigned INVERSER = 37,
  parameter real         A        = 25.42,
  parameter real         B        = -48.62,
  parameter real         C        = 24.2,
  parameter int unsigned D_W      = 14,
  parameter int unsigned PWM_W    = 8,
  parameter int unsigned SETTLE_N = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [V_W-1:0] vref,
  input  logic signed [V_W-1:0] vout,
  output logic                  pwm_hs,
  output logic                  pwm_ls,
  output logic                  period_start,
  output logic [7:0]            lval1,
  output logic [7:0]            lval2,
  output logic signed [8:0]     c0,
  output logic signed [3:0]     e,
  output logic                  e_valid,
  output win_mode_e             mode,
  output logic [D_W-1:0]        d,
  output logic [PWM_W-1:0]      duty,
  output logic                  d_valid,
  output logic                  sat_hi,
  output logic                  sat_lo
);

  adc_error #(
    .INVERSER (INVERSER),
    .LVAL_W   (8),
    .C0_W     (9),
    .E_W      (4),
    .SETTLE_N (SETTLE_N)
  ) u_adc (
    .clk     (clk),
    .rst_n   (rst_n),
    .sample  (period_start),
    .vref    (vref),
    .vout    (vout),
    .lval1   (lval1),
    .lval2   (lval2),
    .c0      (c0),
    .e       (e),
    .e_valid (e_valid),
    .mode    (mode)
  );

  pid_compensator #(
    .A   (A),
    .B   (B),
    .C   (C),
    .E_W (4),
    .D_W (D_W)
  ) u_pid (
    .clk     (clk),
    .rst_n   (rst_n),
    .e_valid (e_valid),
    .e       (e),
    .d       (d),
    .d_valid (d_valid),
    .sat_hi  (sat_hi),
    .sat_lo  (sat_lo)
  );

  dpwm #(
    .D_W   (D_W),
    .PWM_W (PWM_W)
  ) u_dpwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .d            (d),
    .pwm_hs       (pwm_hs),
    .pwm_ls       (pwm_ls),
    .period_start (period_start),
    .duty         (duty)
  );

endmodule
