// vcdl: behavioural model of the voltage-controlled delay cell (not
// synthesizable; it stands for a transistor-level cell).
//
// In silicon the cell is an inverter whose pull-up current is throttled by a
// pMOS (MPC) with the control voltage VC on its gate, followed by a shaping
// inverter, so the cell does not invert and a higher VC gives a longer delay.
// Here every edge on `in` is copied to `out` after a delay that is linear in
// VC around the 0.5 V reference:
//     delay = D_NOM_PS + SLOPE_PS_PER_V * (VC - V_NOM), clamped to
//             [D_MIN_PS, D_MAX_PS].
// VC is sampled when the input edge arrives; the real cell averages VC over
// the transit time. Edges are delayed independently (transport delay), so a
// pulse train shorter than the delay passes intact, but an input pulse
// narrower than PULSE_MIN_PS is swallowed, as the slow internal node of the
// real cell would do; this stops a power-up glitch from circulating in the
// detector's ring oscillator. PULSE_MIN_PS must not exceed D_MIN_PS.
//
// Values: the slope of 2280 ps/V reproduces the reported 11.4 ps delay
// difference at a 5 mV deviation, just over one 10.3 ps inverter delay, which
// sets the +/-5 mV detection resolution. The 270 ps nominal delay is this
// design's choice that makes the detector's trigger loop oscillate with the
// reported 600 ps period. The clamp limits are also this design's own: they
// keep the comparison edge inside the half period so a far-off VC still
// reads as "too high" or "too low" instead of wrapping round.
`timescale 1ps/1fs
module vcdl #(
  parameter real D_NOM_PS       = 270.0,  // delay at VC = V_NOM
  parameter real V_NOM          = 0.5,    // reference operating point (V)
  parameter real SLOPE_PS_PER_V = 2280.0, // delay sensitivity
  parameter real D_MIN_PS       = 20.0,   // shortest delay
  parameter real D_MAX_PS       = 520.0,  // longest delay
  parameter real PULSE_MIN_PS   = 15.0    // narrower input pulses are swallowed
) (
  input  logic in,   // trigger edge in
  input  real  vc,   // control voltage (V)
  output logic out   // delayed, non-inverted copy of in
);

  function automatic real delay_of(input real v);
    real d;
    d = D_NOM_PS + SLOPE_PS_PER_V * (v - V_NOM);
    if (d < D_MIN_PS) d = D_MIN_PS;
    if (d > D_MAX_PS) d = D_MAX_PS;
    return d;
  endfunction

  initial begin
    out = in;
    forever begin
      @(in);
      fork
        begin
          automatic logic val = in;
          automatic real  dly = delay_of(vc);
          #(PULSE_MIN_PS);
          if (in == val) begin
            #(dly - PULSE_MIN_PS);
            out = val;
          end
        end
      join_none
    end
  end

endmodule
