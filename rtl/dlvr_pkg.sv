// dlvr_pkg: types and constants shared by the all-digital push-pull linear
// regulator.
//
// The regulator delivers one of six output levels, 0.5 V to 1.0 V in 0.1 V
// steps. A level is carried as a 3-bit code: 0 means 0.5 V and 5 means 1.0 V.
// The number of levels, the six push-device groups and the divider ratios
// (1, 5/6, 5/7, 5/8, 5/9, 1/2, i.e. 5/(5+code)) come from the regulator's
// specification. The binary code itself and the struct layouts are this
// design's own choice.
`timescale 1ps/1fs
package dlvr_pkg;

  // Number of selectable output levels (0.5 V .. 1.0 V, 0.1 V apart).
  localparam int unsigned NUM_LEVELS = 6;
  // Number of separately enabled push-device groups.
  localparam int unsigned NUM_GROUPS = 6;

  // Output level code: 0 = 0.5 V, 1 = 0.6 V, ... 5 = 1.0 V; 6 and 7 unused.
  typedef logic [2:0] level_t;

  // Result of one digital error detector (DED) comparison.
  //   q1 q2 = 1 1 : divided output below the reference (too low)
  //   q1 q2 = 0 1 : within one inverter delay of the reference (on target)
  //   q1 q2 = 0 0 : divided output above the reference (too high)
  typedef struct packed {
    logic q1;
    logic q2;
  } ded_res_t;

  // Commands for the two drivers of one output-device gate.
  //   pc_on   : the charging driver (MPC or MNC) conducts
  //   disc_on : the discharging driver (MPDisC or MNDisC) conducts
  // For a pMOS push device, disc_on turns the device on; for the nMOS pull
  // device, pc_on turns it on. Both off leaves the gate floating (hold).
  typedef struct packed {
    logic pc_on;
    logic disc_on;
  } drv_t;

  // Nominal output voltage of a level code, in volts.
  function automatic real level_volts(input int unsigned code);
    return 0.5 + 0.1 * real'(code);
  endfunction

  // Dividing ratio of divider tap k (k = level code): 5/(5+k).
  function automatic real divider_ratio(input int unsigned k);
    return 5.0 / (5.0 + real'(k));
  endfunction

endpackage
