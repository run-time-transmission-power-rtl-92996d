// winoc_pkg: constants and helper functions shared by the radio-hub control
// logic of the wireless NoC (run-time transmit-power calibration and
// energy-aware packet relocation).
//
// The document fixes the system at 64 cores. The number of radio hubs (16,
// i.e. 4 cores per hub on a 4x4 hub grid), the number of transmit power
// levels, the training burst and the energy accounting below are this
// design's own choices.
package winoc_pkg;

  // System shape
  localparam int unsigned N_HUBS_DEF   = 16;  // 64 cores / 4 cores per hub
  localparam int unsigned GRID_X_DEF   = 4;   // hubs form a 4x4 grid
  localparam int unsigned LEVELS_DEF   = 16;  // transmit power levels, code 0 = lowest
  localparam int unsigned FLITS_W      = 8;   // packet length field (flits)

  // Calibration
  localparam int unsigned BURST_BITS_DEF = 256;     // training burst length
  localparam int unsigned MAX_ERR_DEF    = 0;       // allowed bit errors per burst
  localparam int unsigned RP_CYCLES_DEF  = 200000;  // reconfiguration period (idle cycles)
  localparam int unsigned TIMEOUT_DEF    = 1024;    // wait for a verdict before failing a probe

  // Energy monitoring
  localparam int unsigned E_W_DEF     = 24;     // energy accumulator width
  localparam int unsigned THRESH_DEF  = 20000;  // energy threshold per window
  localparam int unsigned WINDOW_DEF  = 10000;  // monitoring window (cycles)

  // PRBS-9 training sequence, polynomial x^9 + x^5 + 1
  localparam logic [8:0] PRBS_SEED = 9'h1FF;

  // Directions towards the adjacent hubs, in relocation tie-break order
  typedef enum logic [2:0] {
    DIR_LOCAL = 3'd0,
    DIR_N     = 3'd1,
    DIR_E     = 3'd2,
    DIR_S     = 3'd3,
    DIR_W     = 3'd4
  } dir_e;

  // Next state of the PRBS-9 register; the output bit is state[8].
  function automatic logic [8:0] prbs9_next(input logic [8:0] s);
    return {s[7:0], s[8] ^ s[4]};
  endfunction

  // Energy units spent by one flit at power level code lvl (linear model).
  function automatic int unsigned flit_energy(input int unsigned lvl);
    return lvl + 1;
  endfunction

endpackage
