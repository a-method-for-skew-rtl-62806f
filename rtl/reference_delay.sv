// Reference delay (behavioural model, not synthesizable).
//
// A fixed delay of REF_DELAY_PS at the sender. The calibration loop makes the
// round-trip delay of the line equal to it, so the signal reaches the far end
// after exactly half of it. The scheme does not say how the reference is built
// (a tuned delay element, or a clock phase); its value of 20 ns, which puts
// the far-end arrival at 10 ns, is this design's choice.
`timescale 1ps/1ps
module reference_delay #(
  parameter int unsigned REF_DELAY_PS = 20000
) (
  input  logic a,
  output logic y
);
  assign #(REF_DELAY_PS) y = a;
endmodule
