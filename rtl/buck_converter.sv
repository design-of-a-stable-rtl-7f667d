// Behavioural model of the synchronous dc-dc buck power stage (not a part of
// the controller: it stands in for the analog converter so the loop can be
// simulated). It is written in integer arithmetic and is synthesizable, so
// the whole loop can also run on an FPGA.
//
// Circuit: input source Vg, high-side switch SW1, low-side switch SW2,
// inductor L carrying I_L, output capacitor C and load resistor R. The state
// is the inductor current (mA) and the output voltage (mV), each kept with
// FRAC fraction bits. Every clock is one DPWM tick, Ts/TICKS long, and
// advances the state by one semi-implicit Euler step: the current first,
// then the voltage with the new current,
//     I_L += (Vx - V)        / (L_MOD * TICKS)
//     V   += (I_L - V/R_MOD) / (C_MOD * TICKS)
// where L_MOD = L/Ts and C_MOD = C/Ts (46 and 48 by default, i.e. 46 uH and
// 48 uF at Ts = 1 us, with R_MOD = 1 ohm). Vx, the switch node, is Vg while
// SW1 conducts and 0 while SW2 conducts. With both switches off the body
// diodes decide: Vx = 0 for positive current, Vg for negative current, and
// the inductor is idle (discontinuous conduction) at zero current.
//
// The start state V = 2000 mV, I_L = 1 mA and the current-then-voltage order
// follow the integer design model; stepping at the DPWM tick rate with a
// switched Vx, rather than once per period with the averaged duty, is this
// model's own choice, so it sees the real ripple of the duty signal d(t).
//
// Interface: `vg` is the input voltage in mV, `sw1`/`sw2` the gate signals,
// `vout` and `il` the output voltage and inductor current in mV and mA
// (integer part, registered, updated every clock).
module buck_converter
  import buck_pkg::*;
#(
  parameter int          L_MOD  = 46,
  parameter int          C_MOD  = 48,
  parameter int          R_MOD  = 1,
  parameter int unsigned TICKS  = 256,
  parameter int unsigned FRAC   = 16,
  parameter int          V_INIT = 2000,
  parameter int          IL_INIT = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [V_W-1:0] vg,
  input  logic                  sw1,
  input  logic                  sw2,
  output logic signed [V_W-1:0] vout,
  output logic signed [V_W-1:0] il
);

  localparam int unsigned S_W = 48;
  localparam logic signed [S_W-1:0] L_DIV = S_W'(L_MOD * int'(TICKS));
  localparam logic signed [S_W-1:0] C_DIV = S_W'(C_MOD * int'(TICKS));
  localparam logic signed [S_W-1:0] R_DIV = S_W'(R_MOD);

  logic signed [S_W-1:0] il_q, v_q, il_d, v_d, vx;

  always_comb begin
    if (sw1)                 vx = S_W'(vg) <<< FRAC;
    else if (sw2)            vx = '0;
    else if (il_q > 0)       vx = '0;
    else if (il_q < 0)       vx = S_W'(vg) <<< FRAC;
    else                     vx = v_q;
    il_d = il_q + (vx - v_q) / L_DIV;
    // With both switches open a diode stops the current at zero.
    if (!sw1 && !sw2 && ((il_q > 0 && il_d < 0) || (il_q < 0 && il_d > 0)))
      il_d = '0;
    v_d  = v_q + (il_d - v_q / R_DIV) / C_DIV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      il_q <= S_W'(IL_INIT) <<< FRAC;
      v_q  <= S_W'(V_INIT) <<< FRAC;
    end else begin
      il_q <= il_d;
      v_q  <= v_d;
    end
  end

  assign vout = V_W'(v_q >>> FRAC);
  assign il   = V_W'(il_q >>> FRAC);

  // Shoot-through would short the input source.
  assert property (@(posedge clk) disable iff (!rst_n) !(sw1 && sw2));

endmodule
