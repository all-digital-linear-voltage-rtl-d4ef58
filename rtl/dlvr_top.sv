// dlvr_top: all-digital push-pull linear voltage regulator, 0.5 V to 1.0 V in
// 0.1 V steps from a 1.1 V supply, with optional time-interleaved control.
//
// Loop. The voltage divider scales VREG by 5/(5+level) so that VCMP sits at
// the 0.5 V reference when VREG is on target. The digital error detector
// (DED) turns VCMP and VREF into delays and compares them every trigger
// period (600 ps), giving Q1/Q2 = too low / on target / too high. The control
// logic turns that into driver commands: too low turns the active push groups
// on, too high turns them off and the pull device on, on target leaves the
// push gates floating (hold) and the pull device off. The mode indicator
// picks the divider tap and enables 1 to 6 push groups so the push current
// stays near the design value at every level.
//
// Interleaving. N_DED detectors share VREF and VCMP. Detector 0 runs its own
// ring oscillator; detector k takes detector 0's trigger delayed by
// k * T_TRIG_PS / N_DED. When `interleave` is high, all detectors run and the
// control switch passes the freshest result, so a new decision reaches the
// output devices every T_TRIG_PS / N_DED. When it is low only detector 0 runs
// (the single control type); both types drive the same output devices, as on
// the measured chip. N_DED = 2 is the dual type that was built and measured.
//
// Ports are plain signals; analog nodes are `real` volts and amperes. The
// design is a behavioural model as a whole: the mode indicator, control
// logic, control switch and the DED flip-flops are synthesizable, the delay
// cells, divider and output stage are models of analog parts.
//
// Timing: a DED decision reaches the output devices T_D after its capture
// edge: 450 ps for the single type and 580 ps for the interleaved type, whose
// commands also pass the control switch (both values as reported for the
// 65 nm layout, modelled in output_stage). The loop response is thus about
// 0.6 + 0.45 = 1.05 ns single and 0.3 + 0.58 = 0.88 ns dual.
//
// VDD_RUN sets the supply seen by the output devices (sized for 1.1 V); it is
// there to test line regulation, the reported +/-10 % supply change.
`timescale 1ps/1fs
module dlvr_top
  import dlvr_pkg::*;
#(
  parameter int unsigned N_DED     = 2,       // detectors for interleaved control
  parameter real         T_TRIG_PS = 600.0,   // DED trigger period (detection time)
  parameter real         C_DECAP_F = 4.5e-9,  // decoupling capacitor (F)
  parameter real         I_PUSH_A  = 0.12,    // push current per level (A)
  parameter real         VDD_RUN   = 1.1      // supply applied to the output devices (V)
) (
  input  logic                  rst_n,      // resets the DED flip-flops
  input  logic                  en,         // regulator enable
  input  logic                  interleave, // 1: interleaved control, 0: single
  input  level_t                level,      // output level code, 0 = 0.5 V .. 5 = 1.0 V
  input  real                   vref,       // 0.5 V reference (V)
  input  real                   i_load,     // load current (A)
  output real                   vreg,       // regulated output (V)
  output real                   vcmp,       // divided output seen by the DEDs (V)
  output ded_res_t              res,        // DED result passed to the control logic
  output logic [$clog2(N_DED+1)-1:0] sel,   // detector currently passed on
  output logic [NUM_GROUPS-1:0] grp_en,     // push groups enabled by the mode
  output logic [NUM_GROUPS-1:0] push_on,    // push gate states
  output logic                  pull_on,    // pull gate state
  output logic                  contention  // a gate saw both drivers on
);

  localparam real T_GATE_PS = 20.0;  // NAND + inverter of a DED trigger gate

  logic [NUM_LEVELS-1:0]     div_sel;
  ded_res_t [N_DED-1:0]      ded_res;
  logic     [N_DED-1:0]      ded_phase;
  logic     [N_DED-1:0]      ded_trig;  // only entry 0 is read; the others are for probing
  drv_t     [NUM_GROUPS-1:0] push_drv;
  drv_t                      pull_drv;

  mode_indicator u_mode (.level(level), .div_sel(div_sel), .grp_en(grp_en));

  voltage_divider u_div (.vreg(vreg), .sel(div_sel), .vcmp(vcmp));

  for (genvar k = 0; k < N_DED; k++) begin : g_ded
    if (k == 0) begin : g_first
      ded #(.SELF_OSC(1'b1)) u_ded (
        .rst_n(rst_n), .en(en), .vref(vref), .vcmp(vcmp),
        .trig_in(1'b0), .trig_out(ded_trig[k]),
        .res(ded_res[k]), .cap_phase(ded_phase[k]));
    end else begin : g_dup
      ded #(.SELF_OSC(1'b0),
            .TRIG_DELAY_PS(real'(k) * T_TRIG_PS / real'(N_DED) - T_GATE_PS)) u_ded (
        .rst_n(rst_n), .en(en & interleave), .vref(vref), .vcmp(vcmp),
        .trig_in(ded_trig[0]), .trig_out(ded_trig[k]),
        .res(ded_res[k]), .cap_phase(ded_phase[k]));
    end
  end

  control_switch #(.N_DED(N_DED)) u_sw (
    .res_in(ded_res), .cap_phase(ded_phase), .interleave(interleave),
    .res_out(res), .sel(sel));

  control_logic #(.NG(NUM_GROUPS)) u_ctl (
    .res(res), .en(en), .grp_en(grp_en),
    .push_drv(push_drv), .pull_drv(pull_drv));

  output_stage #(.NG(NUM_GROUPS), .C_DECAP_F(C_DECAP_F), .I_PUSH_A(I_PUSH_A),
                 .VDD_RUN(VDD_RUN)) u_out (
    .push_drv(push_drv), .pull_drv(pull_drv), .i_load(i_load),
    .long_path(interleave), .vreg(vreg), .push_on(push_on), .pull_on(pull_on), .contention(contention));

endmodule
