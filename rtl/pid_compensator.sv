// Incremental (velocity-form) PID compensator.
//
// Computes the discrete command
//     d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2)
// once per error sample, which is the PID law Kp + Ki/s + Kd*s mapped to the
// z domain with the backward-Euler substitution s = (1 - z^-1)/Ts. The
// default coefficients a = 25.42, b = -48.62, c = 24.2 are the tuned values
// of the loop, from a pole-zero design against the power stage; a + b + c = 1,
// so a constant error e moves d by e per sample.
//
// Arithmetic (this design's choice): the coefficients are rounded to signed
// fixed point with COEF_FRAC = 8 fraction bits (6508, -12447, 6195, still
// summing to exactly 1.0). The accumulator holds d(n) with those 8 fraction
// bits, so small corrections integrate instead of being lost. It saturates
// to the duty range [0, 2^D_W - 1], which also stops integrator wind-up. The
// output d is the integer part: an unsigned D_W-bit duty word, duty = d/2^D_W.
// The command width sets the loop gain the coefficients act on: with the
// default converter, 14 bits settle without a limit cycle, 13 bits leave a
// wander of about one ADC step and 12 bits or fewer oscillate.
//
// Timing: on an `e_valid` pulse the new error is taken, d and the error
// history update at that clock edge, and `d_valid` pulses one clock after
// `e_valid`. `sat_hi`/`sat_lo` pulse with `d_valid` when the new value hit a
// rail. Reset clears the history and sets d to D_INIT.
module pid_compensator #(
  parameter real         A         = 25.42,
  parameter real         B         = -48.62,
  parameter real         C         = 24.2,
  parameter int unsigned COEF_FRAC = 8,
  parameter int unsigned E_W       = 4,
  parameter int unsigned D_W       = 14,
  parameter int unsigned D_INIT    = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  e_valid,
  input  logic signed [E_W-1:0] e,
  output logic [D_W-1:0]        d,
  output logic                  d_valid,
  output logic                  sat_hi,
  output logic                  sat_lo
);

  // Fixed-point coefficients, rounded to nearest.
  localparam int A_Q = int'(A * (2.0 ** COEF_FRAC));
  localparam int B_Q = int'(B * (2.0 ** COEF_FRAC));
  localparam int C_Q = int'(C * (2.0 ** COEF_FRAC));

  // Accumulator: sign bit + D_W integer bits + COEF_FRAC fraction bits +
  // headroom for one update past a rail.
  localparam int unsigned ACC_W = D_W + COEF_FRAC + 8;
  localparam logic signed [ACC_W-1:0] ACC_MAX =
      ACC_W'((64'(1) << (D_W + COEF_FRAC)) - (64'(1) << COEF_FRAC));

  logic signed [ACC_W-1:0] acc_q, acc_sum, acc_d;
  logic signed [E_W-1:0]   e1_q, e2_q;
  logic                    hi_d, lo_d;

  always_comb begin
    acc_sum = acc_q
            + ACC_W'(A_Q) * ACC_W'(e)
            + ACC_W'(B_Q) * ACC_W'(e1_q)
            + ACC_W'(C_Q) * ACC_W'(e2_q);
    hi_d  = acc_sum > ACC_MAX;
    lo_d  = acc_sum < 0;
    acc_d = hi_d ? ACC_MAX : (lo_d ? '0 : acc_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= ACC_W'(64'(D_INIT) << COEF_FRAC);
      e1_q    <= '0;
      e2_q    <= '0;
      d_valid <= 1'b0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
    end else begin
      d_valid <= e_valid;
      sat_hi  <= e_valid & hi_d;
      sat_lo  <= e_valid & lo_d;
      if (e_valid) begin
        acc_q <= acc_d;
        e1_q  <= e;
        e2_q  <= e1_q;
      end
    end
  end

  assign d = acc_q[COEF_FRAC +: D_W];

  // The accumulator never leaves the duty range.
  assert property (@(posedge clk) disable iff (!rst_n) acc_q >= 0 && acc_q <= ACC_MAX);

endmodule
