// ded: behavioural model of the digital error detector (not synthesizable as
// a whole: its delay lines are analog and its trigger is a ring oscillator).
//
// Two delay lines start on the same trigger edge. The comparison line is a
// voltage-controlled delay cell driven by VCMP (the divided output) followed
// by three inverters, ending in D0. The reference line is the same cell
// driven by VREF followed by four inverters; its taps after two and four
// inverters are C1 and C2. When VCMP equals VREF, D0 lands halfway between
// C1 and C2, one inverter delay from each. The phase comparator (two
// flip-flops) samples D0 on C1 and C2 and yields Q1/Q2:
//     VCMP < VREF - 5 mV : 1 1      |VCMP - VREF| < 5 mV : 0 1
//     VCMP > VREF + 5 mV : 0 0
// The first detector triggers itself: the reference line's first inverter
// feeds a NAND with EN and an inverter back to both delay cells, an odd loop
// that oscillates. With the default delays the loop takes 300 ps, giving the
// 600 ps trigger period (the detection time). EN low stops the oscillator and
// freezes Q1/Q2. For time-interleaved control, further detectors
// (SELF_OSC = 0) take the first detector's trigger through a fixed delay
// TRIG_DELAY_PS and their own NAND/inverter EN gate instead of closing their
// own loop; their trigger node then lags trig_in by TRIG_DELAY_PS plus one
// NAND and one inverter delay.
//
// The structure follows the detector described for the regulator; the gate
// delays (10 ps inverter and NAND) are this design's estimates, chosen near
// the reported 10.3 ps inverter delay.
//
// Ports: res is {Q1,Q2}; cap_phase is the C2 node (its falling edge is the
// moment a new result appears); trig_out is this detector's trigger node.
// trig_in is left unread when SELF_OSC = 1, so lint reports it as unused in
// that configuration.
`timescale 1ps/1fs
module ded
  import dlvr_pkg::*;
#(
  parameter bit  SELF_OSC       = 1'b1,   // 1: own ring oscillator, 0: external trigger
  parameter real TRIG_DELAY_PS  = 0.0,    // delay of trig_in (SELF_OSC = 0 only)
  parameter real T_INV_PS       = 10.0,   // inverter delay
  parameter real T_NAND_PS      = 10.0,   // NAND delay
  parameter real VCDL_NOM_PS    = 270.0,  // delay cell delay at 0.5 V
  parameter real VCDL_SLOPE     = 2280.0  // delay cell sensitivity (ps/V)
) (
  input  logic     rst_n,     // resets Q1/Q2 to the hold code 0 1
  input  logic     en,        // detector enable
  input  real      vref,      // reference voltage (V)
  input  real      vcmp,      // divided output voltage (V)
  input  logic     trig_in,   // external trigger (SELF_OSC = 0)
  output logic     trig_out,  // trigger node of this detector
  output ded_res_t res,       // {Q1, Q2}
  output logic     cap_phase  // C2 level
);

  logic trig, cmp_o, ref_o;
  logic cmp_n1, cmp_n2, d0;
  logic ref_n1, c1, ref_n3, c2;
  logic nand_o, trig_src;

  vcdl #(.D_NOM_PS(VCDL_NOM_PS), .SLOPE_PS_PER_V(VCDL_SLOPE))
    u_vcdl_cmp (.in(trig), .vc(vcmp), .out(cmp_o));
  vcdl #(.D_NOM_PS(VCDL_NOM_PS), .SLOPE_PS_PER_V(VCDL_SLOPE))
    u_vcdl_ref (.in(trig), .vc(vref), .out(ref_o));

  // Comparison path: three shaping inverters.
  assign #(T_INV_PS) cmp_n1 = ~cmp_o;
  assign #(T_INV_PS) cmp_n2 = ~cmp_n1;
  assign #(T_INV_PS) d0     = ~cmp_n2;

  // Reference path: four inverters, taps C1 and C2.
  assign #(T_INV_PS) ref_n1 = ~ref_o;
  assign #(T_INV_PS) c1     = ~ref_n1;
  assign #(T_INV_PS) ref_n3 = ~c1;
  assign #(T_INV_PS) c2     = ~ref_n3;

  // Trigger: own loop, or the delayed trigger of the first detector.
  if (SELF_OSC) begin : g_osc
    assign trig_src = ref_n1;
  end else begin : g_ext
    assign #(TRIG_DELAY_PS) trig_src = trig_in;
  end
  assign #(T_NAND_PS) nand_o = ~(en & trig_src);
  assign #(T_INV_PS)  trig   = ~nand_o;

  phase_comparator u_pc (.rst_n(rst_n), .d0(d0), .c1(c1), .c2(c2), .res(res));

  assign trig_out  = trig;
  assign cap_phase = c2;

endmodule
