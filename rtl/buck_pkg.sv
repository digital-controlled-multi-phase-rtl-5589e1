// buck_pkg: types and constants shared by the digital controller of the
// 4-phase master-slave hysteretic buck converter.
//
// The converter has one master phase (which closes the hysteretic voltage
// loop) and three slave phases whose switching signals are delayed copies of
// the master signal, 90 degrees apart, with individually trimmed duty cycles.
// The phase count, the 10-bit DFS DAC, and the 32-tap / 5-bit duty-cycle
// adder and subtractor come from the design description; the operating-mode
// encoding is this implementation's choice.
package buck_pkg;

  // Number of phases (1 master + 3 slaves).
  localparam int unsigned N_PHASES = 4;
  localparam int unsigned N_SLAVES = N_PHASES - 1;

  // Resolution of the hysteresis-window current-steering DAC.
  localparam int unsigned DFS_DAC_W = 10;

  // Taps of each duty-cycle addition (DCA) and subtraction (DCS) section,
  // and the width of the index that selects one of them.
  localparam int unsigned FINE_TAPS  = 32;
  localparam int unsigned FINE_SEL_W = 5;

  // Operating modes, from heaviest to lightest load.
  typedef enum logic [1:0] {
    MODE_MULTI = 2'd0,  // all four phases switching, delay line running
    MODE_SHED  = 2'd1,  // slaves and delay line off, master at full size
    MODE_BURST = 2'd2   // master with 75 % of its FETs off, burst/diode emulation
  } mode_e;

  // Selection for one slave's duty-cycle calibration (MUX2 + MUX64).
  typedef struct packed {
    logic                  inc;  // 1: OR with a late tap (add), 0: AND with an early tap (subtract)
    logic [FINE_SEL_W-1:0] idx;  // tap index; tap k moves the falling edge by (k+1) tap delays
  } dcc_sel_t;

endpackage
