// Wire segment for the testbenches (behavioural model).
//
// A lossless, matched piece of board or cable wire with propagation delay
// DELAY_PS: the signal at 'y' is the signal at 'a' DELAY_PS later.
`timescale 1ps/1ps
module tb_line #(
  parameter int unsigned DELAY_PS = 1000
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
