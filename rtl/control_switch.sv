// control_switch: the MUX-based control switch of time-interleaved control.
//
// N_DED error detectors run from the same trigger, each one started T/N_DED
// later than the one before (T = trigger period). The switch passes on the
// result of the detector that sampled most recently, so the output devices
// see a new decision N_DED times per trigger period.
//
// How the freshest detector is found is this design's own choice. Every DED
// reports the level of its C2 node (cap_phase). C2 has a 50 % duty cycle and
// the flip-flops sample on its falling edge, so detector k holds the newest
// result exactly while its own C2 is low and the C2 of detector k+1 (mod N)
// is still high. The select is decoded combinationally from these levels; it
// changes on the falling C2 edge of each detector. With interleave low (the
// single control type) or N_DED = 1 the switch always passes detector 0.
// If no detector matches (detectors stopped) detector 0 is passed.
`timescale 1ps/1fs
module control_switch
  import dlvr_pkg::*;
#(
  parameter int unsigned N_DED = 2        // number of interleaved detectors
) (
  input  ded_res_t [N_DED-1:0] res_in,     // result of every detector
  input  logic     [N_DED-1:0] cap_phase,  // C2 level of every detector
  input  logic                 interleave, // 1: dual/multi type, 0: single type
  output ded_res_t             res_out,    // result passed to the control logic
  output logic     [$clog2(N_DED+1)-1:0] sel // index of the detector passed on
);

  localparam int unsigned SW = $clog2(N_DED + 1);

  logic [SW-1:0] found;
  logic          hit;

  always_comb begin
    found = '0;
    hit   = 1'b0;
    for (int k = 0; k < N_DED; k++) begin
      if (!cap_phase[k] && cap_phase[(k + 1) % N_DED]) begin
        found = SW'(k);
        hit   = 1'b1;
      end
    end
  end

  always_comb begin
    if (!interleave || N_DED == 1) sel = '0;
    else                           sel = hit ? found : '0;
    res_out = res_in[sel];
  end

endmodule
