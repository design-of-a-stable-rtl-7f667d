// Closed loop of the synchronous buck converter and its digital controller.
//
// The converter model produces the output voltage Vout; the controller
// samples it once per switching period, compares it with the reference set
// by the load processor (`vref`, a port because the processor is outside
// this design), runs the PID law and drives both converter switches through
// the DPWM. One clock is one DPWM tick: with the default 8-bit DPWM a 256 MHz
// clock gives the 1 MHz switching frequency and Ts = 1 us of the design point.
// The loop structure and the converter, ADC and PID defaults are the
// specified design point; the command and DPWM widths (D_W, PWM_W) and the
// window settling count (SETTLE_N) are this design's choices. The converter
// is a model (see buck_converter), not hardware.
//
// Interface: `vg` and `vref` in mV are inputs; the outputs show the
// converter state (`vout` in mV, `il` in mA), the gate signals, and the
// controller's internal variables for observation. Reset (`rst_n` low,
// asynchronous) puts the converter at V = 2000 mV, I_L = 1 mA and the
// controller at d = 0.
module buck_closed_loop
  import buck_pkg::*;
#(
  parameter int          L_MOD    = 46,
  parameter int          C_MOD    = 48,
  parameter int          R_MOD    = 1,
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
  input  logic signed [V_W-1:0] vg,
  input  logic signed [V_W-1:0] vref,
  output logic signed [V_W-1:0] vout,
  output logic signed [V_W-1:0] il,
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

  buck_converter #(
    .L_MOD   (L_MOD),
    .C_MOD   (C_MOD),
    .R_MOD   (R_MOD),
    .TICKS   (1 << PWM_W),
    .V_INIT  (V_INIT_MV),
    .IL_INIT (IL_INIT_MA)
  ) u_conv (
    .clk   (clk),
    .rst_n (rst_n),
    .vg    (vg),
    .sw1   (pwm_hs),
    .sw2   (pwm_ls),
    .vout  (vout),
    .il    (il)
  );

  digital_controller #(
    .INVERSER (INVERSER),
    .A        (A),
    .B        (B),
    .C        (C),
    .D_W      (D_W),
    .PWM_W    (PWM_W),
    .SETTLE_N (SETTLE_N)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .vref         (vref),
    .vout         (vout),
    .pwm_hs       (pwm_hs),
    .pwm_ls       (pwm_ls),
    .period_start (period_start),
    .lval1        (lval1),
    .lval2        (lval2),
    .c0           (c0),
    .e            (e),
    .e_valid      (e_valid),
    .mode         (mode),
    .d            (d),
    .duty         (duty),
    .d_valid      (d_valid),
    .sat_hi       (sat_hi),
    .sat_lo       (sat_lo)
  );

endmodule
