// voltage_divider: behavioural model of the switched resistive divider (not
// synthesizable; it stands for a resistor string with analog switches).
//
// A resistor string from VREG to ground has taps at ratios 1, 5/6, 5/7, 5/8,
// 5/9 and 1/2. Switch k connects tap k, ratio 5/(5+k), to VCMP, so that VCMP
// equals the 0.5 V reference exactly when VREG is at level k
// (0.5 V + 0.1 V * k). The mode indicator closes one switch at a time. The
// ratios and switch order follow the regulator's divider; the 27 kOhm string
// draws about 37 uA at 1 V, which this model ignores. With no switch closed
// the VCMP node is taken as 0 V; with several closed, the lowest index wins
// (both are this design's choices for states the mode indicator never
// produces). The output follows VREG with no delay.
`timescale 1ps/1fs
module voltage_divider
  import dlvr_pkg::*;
(
  input  real                   vreg,  // regulated output (V)
  input  logic [NUM_LEVELS-1:0] sel,   // one-hot switch closes
  output real                   vcmp   // divided voltage for the DED (V)
);

  always_comb begin
    vcmp = 0.0;
    for (int k = NUM_LEVELS - 1; k >= 0; k--) begin
      if (sel[k]) vcmp = vreg * divider_ratio(k);
    end
  end

endmodule
