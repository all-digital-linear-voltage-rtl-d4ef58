// mode_indicator: turns the requested output level into the settings of the
// regulator's variable-output hardware.
//
// Two outputs are decoded from the 3-bit level code (0 = 0.5 V .. 5 = 1.0 V):
//   div_sel : one-hot close command for the voltage-divider switches. Switch k
//             passes the tap with ratio 5/(5+k) (1, 5/6, 5/7, 5/8, 5/9, 1/2),
//             so 0.7 V (code 2) closes the third switch, 5/7.
//   grp_en  : thermometer enable of the six push-device groups. Group g is
//             active for every level whose code is g or higher, so 0.5 V uses
//             group 1 only and 1.0 V uses all six.
// Both mappings follow the regulator's specification. The codes 6 and 7 do
// not name a level; this design treats them as 0.5 V, the lowest and safest
// output. The block is purely combinational: its outputs follow the code
// after a gate delay, and a level change takes effect at the next DED
// comparison.
`timescale 1ps/1fs
module mode_indicator
  import dlvr_pkg::*;
(
  input  level_t                 level,   // requested output level code
  output logic [NUM_LEVELS-1:0]  div_sel, // one-hot divider switch select
  output logic [NUM_GROUPS-1:0]  grp_en   // push-group enables, thermometer
);

  logic [2:0] code;

  always_comb begin
    code = (level < level_t'(NUM_LEVELS)) ? level : '0;
    div_sel = '0;
    div_sel[code] = 1'b1;
    for (int g = 0; g < NUM_GROUPS; g++) begin
      grp_en[g] = (32'(code) >= g);
    end
  end

endmodule
