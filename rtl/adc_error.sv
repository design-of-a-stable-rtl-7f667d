// ADC error generator: turns the sampled output voltage into the error e(n).
//
// On every `sample` strobe (once per switching period) the reference and the
// regulated output voltage, both in mV, are quantized to 8-bit codes by
// dividing by the ADC step INVERSER (37 mV): lval1 = Vref/37, lval2 = Vout/37.
// The raw error is c0 = lval1 - lval2 (9-bit signed). c0 is then limited to a
// window before it reaches the compensator: +/-COARSE_LIM (7) in coarse mode
// and +/-FINE_LIM (4) in fine mode.
//
// The window follows a small hysteresis state machine, which is this design's
// own choice (the two ranges are specified, the condition that picks one is
// not): the limiter enters fine mode once |c0| <= FINE_LIM has held for
// SETTLE_N consecutive samples, and drops back to coarse mode as soon as
// |c0| > COARSE_LIM. The sample that causes a mode change is already limited
// with the new window. Negative voltages quantize to 0 and voltages above
// 255 steps saturate at 255.
//
// Timing: all outputs are registered. lval1, lval2, c0, e and mode change one
// clock after `sample`, together with a one-clock `e_valid` pulse.
module adc_error
  import buck_pkg::*;
#(
  parameter int unsigned INVERSER   = 37,
  parameter int unsigned LVAL_W     = 8,
  parameter int unsigned C0_W       = 9,
  parameter int unsigned E_W        = 4,
  parameter int unsigned COARSE_LIM = 7,
  parameter int unsigned FINE_LIM   = 4,
  parameter int unsigned SETTLE_N   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  logic signed [V_W-1:0]    vref,
  input  logic signed [V_W-1:0]    vout,
  output logic [LVAL_W-1:0]        lval1,
  output logic [LVAL_W-1:0]        lval2,
  output logic signed [C0_W-1:0]   c0,
  output logic signed [E_W-1:0]    e,
  output logic                     e_valid,
  output win_mode_e                mode
);

  localparam int unsigned CNT_W = $clog2(SETTLE_N + 1);
  localparam int unsigned LVAL_MAX = (1 << LVAL_W) - 1;

  // Quantize a voltage in mV to an LVAL_W-bit code.
  function automatic logic [LVAL_W-1:0] quantize(input logic signed [V_W-1:0] v);
    logic [V_W-1:0] q;
    if (v < 0) return '0;
    q = V_W'($unsigned(v)) / V_W'(INVERSER);
    if (q > V_W'(LVAL_MAX)) return LVAL_W'(LVAL_MAX);
    return q[LVAL_W-1:0];
  endfunction

  logic [LVAL_W-1:0]      q_ref, q_out;
  logic signed [C0_W-1:0] raw;
  logic [C0_W-1:0]        raw_mag;
  logic [CNT_W-1:0]       cnt_q, cnt_d;
  win_mode_e              mode_d;
  logic signed [C0_W-1:0] lim;
  logic signed [E_W-1:0]  clipped;

  always_comb begin
    q_ref   = quantize(vref);
    q_out   = quantize(vout);
    raw     = $signed({1'b0, q_ref}) - $signed({1'b0, q_out});
    raw_mag = raw[C0_W-1] ? C0_W'(-raw) : C0_W'(raw);

    // Window selection with hysteresis.
    mode_d = mode;
    cnt_d  = cnt_q;
    if (raw_mag > C0_W'(COARSE_LIM)) begin
      mode_d = WIN_COARSE;
      cnt_d  = '0;
    end else if (raw_mag <= C0_W'(FINE_LIM)) begin
      if (cnt_q < CNT_W'(SETTLE_N)) cnt_d = cnt_q + 1'b1;
      if (cnt_d >= CNT_W'(SETTLE_N)) mode_d = WIN_FINE;
    end else begin
      cnt_d = '0;
    end

    lim = (mode_d == WIN_FINE) ? C0_W'(FINE_LIM) : C0_W'(COARSE_LIM);
    if (raw > lim)       clipped = E_W'(lim);
    else if (raw < -lim) clipped = E_W'(-lim);
    else                 clipped = E_W'(raw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lval1   <= '0;
      lval2   <= '0;
      c0      <= '0;
      e       <= '0;
      e_valid <= 1'b0;
      mode    <= WIN_COARSE;
      cnt_q   <= '0;
    end else begin
      e_valid <= sample;
      if (sample) begin
        lval1 <= q_ref;
        lval2 <= q_out;
        c0    <= raw;
        e     <= clipped;
        mode  <= mode_d;
        cnt_q <= cnt_d;
      end
    end
  end

  // The limited error must fit the E_W-bit output.
  initial assert (COARSE_LIM < (1 << (E_W - 1)) && FINE_LIM <= COARSE_LIM)
    else $error("adc_error: window limits do not fit E_W");

endmodule
