// output_stage: behavioural model of the drivers, the six push-device groups,
// the pull device and the on-chip decoupling capacitor (not synthesizable; it
// stands for large analog devices and integrates the output node in time).
//
// Drivers and gates. Each output device has a gate node driven by a pair of
// drivers (see control_logic). A command change reaches the gate T_D_PS after
// it leaves the control logic; this lumps the fan-out buffers, the drivers
// and the gate slewing (450 ps in the reported 65 nm layout). With
// long_path high (interleaved control) the delay is T_D_LONG_PS instead
// (580 ps reported), covering the extra switch logic. The gate then
// follows the driver pair: pc_on alone turns a pMOS push device off and the
// nMOS pull device on, disc_on alone does the opposite, and with both drivers
// off the gate floats and the device keeps its previous state (HOLD). Both
// drivers on is a short circuit: the device is taken as off and `contention`
// is raised (sticky).
//
// Devices. The push devices are pMOS from VDD with their gate at 0 V when on,
// so push group g delivers, in the linear region (VREG > VTH),
//     I = k_g/2 * (VDD - VREG) * (VDD + VREG - 2*VTH_P)
// and k_g/2 * (VDD - VTH_P)^2 in saturation. The groups are sized so that the
// groups active at level L (groups 0..L) together deliver I_PUSH_A exactly at
// that level's nominal voltage: sum k_0..k_L = I_PUSH_A / f(V_L) with
// f(V) = (VDD - V)(VDD + V - 2*VTH_P)/2. The pull device is an nMOS with its
// gate at VDD, in its linear or saturation region depending on VREG, with
// channel-length modulation LAMBDA_N in saturation.
//
// Output node. Every DT_PS the node is advanced by
//     dV = (I_push - I_pull - i_load) * DT / C_DECAP_F
// and clamped to [0, VDD_RUN].
//
// Supply. The devices are sized at the nominal VDD. VDD_RUN is the supply
// actually applied to the push sources and the pull gate; setting it away
// from VDD shows line regulation. The detector and the drivers are taken as
// supply-independent.
//
// What follows the regulator description: the push-pull structure, the
// driver truth table, the accumulated group activation, the 1.1 V supply,
// the current equations, the 100 mA design load and the 4.5 nF capacitor of
// the measured chip. This design's own values: the threshold voltages
// (0.35 V, chosen so the same devices give about 4x the current at 0.5 V as
// at 1 V, as reported), the 20 % push-current margin (the push current is
// described as "a little larger" than the load), the pull device size and
// LAMBDA_N, and the time step.
//
// The gate states and the output voltage start from declaration initialisers
// and are then updated procedurally, and the transport delays are runtime
// values. Lint notes both; they are deliberate in this model.
`timescale 1ps/1fs
module output_stage
  import dlvr_pkg::*;
#(
  parameter int unsigned NG       = NUM_GROUPS,
  parameter real VDD              = 1.1,     // nominal supply, used to size the devices (V)
  parameter real VDD_RUN          = VDD,     // supply actually applied (V)
  parameter real VTH_P            = 0.35,    // push pMOS threshold (V)
  parameter real VTH_N            = 0.35,    // pull nMOS threshold (V)
  parameter real I_PUSH_A         = 0.12,    // push current at each level's target (A)
  parameter real K_PULL           = 0.4,     // pull nMOS transconductance k (A/V^2)
  parameter real LAMBDA_N         = 0.1,     // pull channel-length modulation (1/V)
  parameter real C_DECAP_F        = 4.5e-9,  // decoupling capacitor (F)
  parameter real T_D_PS           = 450.0,   // control-to-gate delay, single type
  parameter real T_D_LONG_PS      = 580.0,   // control-to-gate delay with the switch in the path
  parameter real DT_PS            = 5.0,     // integration step
  parameter real V_INIT           = 0.0      // output voltage at time 0 (V)
) (
  input  drv_t [NG-1:0] push_drv,   // driver commands per push group
  input  drv_t          pull_drv,   // driver commands of the pull device
  input  real           i_load,     // load current drawn from VREG (A)
  input  logic          long_path,  // 1: commands pass the interleaving switch
  output real           vreg,       // regulated output (V)
  output logic [NG-1:0] push_on,    // push gate states
  output logic          pull_on,    // pull gate state
  output logic          contention  // both drivers of one gate were on
);

  // Push characteristic f(V) of a unit-k pMOS at output voltage v, supply vdd.
  function automatic real f_push(input real v, input real vdd);
    real vsd;
    vsd = vdd - v;
    if (v <= VTH_P) return 0.5 * (vdd - VTH_P) * (vdd - VTH_P);
    return 0.5 * vsd * (vdd + v - 2.0 * VTH_P);
  endfunction

  // Total k of push groups 0..l, sized for I_PUSH_A at level l.
  function automatic real k_total(input int l);
    if (l < 0) return 0.0;
    return I_PUSH_A / f_push(level_volts(l), VDD);
  endfunction

  function automatic real i_pull(input real v);
    real vov;
    vov = VDD_RUN - VTH_N;
    if (v < vov) return 0.5 * K_PULL * v * (2.0 * vov - v);
    return 0.5 * K_PULL * vov * vov * (1.0 + LAMBDA_N * v);
  endfunction

  drv_t [NG-1:0] push_drv_d;
  drv_t          pull_drv_d;

  // Transport delay from the control logic to the gates.
  initial begin
    push_drv_d = push_drv;
    forever begin
      @(push_drv);
      fork
        begin
          automatic drv_t [NG-1:0] val = push_drv;
          automatic real dly = long_path ? T_D_LONG_PS : T_D_PS;
          #(dly) push_drv_d = val;
        end
      join_none
    end
  end
  initial begin
    pull_drv_d = pull_drv;
    forever begin
      @(pull_drv);
      fork
        begin
          automatic drv_t val = pull_drv;
          automatic real dly = long_path ? T_D_LONG_PS : T_D_PS;
          #(dly) pull_drv_d = val;
        end
      join_none
    end
  end

  // Gate nodes: driven on, driven off, or floating (hold). All devices
  // start off.
  logic [NG-1:0] gate_p  = '0;
  logic          gate_n  = 1'b0;
  logic          contend = 1'b0;

  always @(push_drv_d or pull_drv_d) begin
    for (int g = 0; g < NG; g++) begin
      case ({push_drv_d[g].pc_on, push_drv_d[g].disc_on})
        2'b01:   gate_p[g] = 1'b1;
        2'b10:   gate_p[g] = 1'b0;
        2'b11: begin gate_p[g] = 1'b0; contend = 1'b1; end
        default: ;  // both drivers off: gate holds its charge
      endcase
    end
    case ({pull_drv_d.pc_on, pull_drv_d.disc_on})
      2'b10:   gate_n = 1'b1;
      2'b01:   gate_n = 1'b0;
      2'b11: begin gate_n = 1'b0; contend = 1'b1; end
      default: ;
    endcase
  end

  assign push_on    = gate_p;
  assign pull_on    = gate_n;
  assign contention = contend;

  // Output node integration, one step every DT_PS.
  real v = V_INIT;
  real i_net, i_p;

  always begin
    #(DT_PS);
    i_p = 0.0;
    for (int g = 0; g < NG; g++)
      if (gate_p[g]) i_p += (k_total(g) - k_total(g - 1)) * f_push(v, VDD_RUN);
    i_net = i_p - (gate_n ? i_pull(v) : 0.0) - i_load;
    v = v + i_net * DT_PS * 1.0e-12 / C_DECAP_F;
    if (v < 0.0) v = 0.0;
    if (v > VDD_RUN) v = VDD_RUN;
  end

  assign vreg = v;

endmodule
