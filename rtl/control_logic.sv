// control_logic: converts the DED decision (Q1/Q2) into commands for the
// drivers of the push and pull output devices.
//
// Each push group has a pMOS push device whose gate is pulled up by MPC (push
// off) or pulled down by MPDisC (push on). The pull device is an nMOS whose
// gate is pulled up by MNC (pull on) or down by MNDisC (pull off). The driver
// states follow the regulator's truth table:
//
//   Q1 Q2 | MPC  MPDisC  push | MNC  MNDisC  pull
//   1  1  | off  on      on   | off  on      off
//   0  1  | off  off     hold | off  on      off
//   0  0  | on   off     off  | on   off     on
//
// so MPC, MNC and MNDisC follow Q2 and MPDisC follows Q1. A disabled push
// group (grp_en low) keeps MPC on and MPDisC off, so its device stays off;
// this is where the per-group enable of the fan-out tree sits.
//
// Own choices: the code Q1 Q2 = 1 0 is not a valid comparison result but can
// appear when a DED flip-flop samples on an edge. MPDisC is therefore driven
// by Q1 AND Q2, which gives 1 0 the "too high" action and never turns MPC and
// MPDisC on together. The inverter fan-out buffers of the real circuit only
// add delay and are not modelled here; that delay is lumped into the output
// stage. Purely combinational, no clock.
`timescale 1ps/1fs
module control_logic
  import dlvr_pkg::*;
#(
  parameter int unsigned NG = NUM_GROUPS   // number of push groups
) (
  input  ded_res_t         res,       // selected DED result
  input  logic             en,        // regulator enabled
  input  logic [NG-1:0]    grp_en,    // push-group enables from the mode indicator
  output drv_t  [NG-1:0]   push_drv,  // MPC / MPDisC commands per group
  output drv_t             pull_drv   // MNC / MNDisC commands
);

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      push_drv[g].pc_on   = ~res.q2 | ~grp_en[g] | ~en;
      push_drv[g].disc_on = res.q1 & res.q2 & grp_en[g] & en;
    end
    pull_drv.pc_on   = ~res.q2 & en;
    pull_drv.disc_on = res.q2 | ~en;
  end

endmodule
