// Pad buffer (behavioural model, not synthesizable).
//
// An input or output pad driver with propagation delay DELAY_PS (T_pd). The
// compensation scheme assumes the output and input buffers have the same
// delay; using one model for both makes that true. The 1 ns value is this
// design's choice.
`timescale 1ps/1ps
module pad_buffer #(
  parameter int unsigned DELAY_PS = 1000
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
