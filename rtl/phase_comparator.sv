// phase_comparator: the two flip-flops of the digital error detector (DED).
//
// D0 is the end of the comparison delay line; C1 and C2 are taps of the
// reference delay line, one inverter delay before and after the point where
// D0 lands when both lines see the same voltage. Q1 samples D0 on C1 and Q2
// samples D0 on C2. D0 rises inside the sampling window, so:
//   D0 rises before C1          -> Q1 Q2 = 1 1 (compared voltage too low)
//   D0 rises between C1 and C2  -> Q1 Q2 = 0 1 (on target)
//   D0 rises after C2           -> Q1 Q2 = 0 0 (compared voltage too high)
// The flip-flops sample on the falling edges of C1 and C2, the edges that
// follow a falling trigger edge and bracket the rising D0 edge. That edge
// choice and the asynchronous reset to 0 1 (the neutral "hold" code) are this
// design's own; the rest follows the detector described for the regulator.
`timescale 1ps/1fs
module phase_comparator
  import dlvr_pkg::*;
(
  input  logic     rst_n, // asynchronous reset, active low, to the hold code
  input  logic     d0,    // end of the comparison delay line
  input  logic     c1,    // early reference tap
  input  logic     c2,    // late reference tap
  output ded_res_t res    // {Q1, Q2}
);

  logic q1, q2;

  always_ff @(negedge c1 or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= d0;
  end

  always_ff @(negedge c2 or negedge rst_n) begin
    if (!rst_n) q2 <= 1'b1;
    else        q2 <= d0;
  end

  assign res = '{q1: q1, q2: q2};

endmodule
