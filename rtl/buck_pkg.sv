// Shared types and nominal constants of the buck converter control loop.
//
// Voltages are carried in mV and currents in mA as signed V_W-bit integers
// on all module boundaries (the design point is Vg = 5000 mV and
// Vref = 2800 mV). The converter model starts from V = 2000 mV and
// I_L = 1 mA. The error-window mode type and its encoding are this design's
// own.
package buck_pkg;

  // Voltages (mV) and currents (mA) on the module boundaries.
  localparam int unsigned V_W = 16;

  // Start state of the converter model after reset.
  localparam int V_INIT_MV  = 2000;
  localparam int IL_INIT_MA = 1;

  // Error limiter window: coarse (+/-7) while the loop is far from the
  // reference, fine (+/-4) once it has settled.
  typedef enum logic {
    WIN_COARSE = 1'b0,
    WIN_FINE   = 1'b1
  } win_mode_e;

endpackage
