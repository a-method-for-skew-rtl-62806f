// Variable delay line (behavioural model, not synthesizable).
//
// Models the digital form of a variable delay line: a chain of 2**CODE_W-1
// identical buffer stages, each adding TAP_PS, whose taps feed a multiplexer
// with delay MUX_PS. Input 'sel' picks the tap, so the delay from 'a' to 'y'
// is MUX_PS + sel*TAP_PS. Two instances driven by the same 'sel' form the
// matched pair; matching is exact here because the instances are identical.
// The buffer-chain-plus-multiplexer structure, the coarse step of one buffer
// delay and the minimum delay of one multiplexer follow the published scheme; the stage
// delay, the multiplexer delay and the number of taps are this design's
// choices. Delays are transport-like continuous assignments; pulses must be
// longer than TAP_PS and MUX_PS to pass.
`timescale 1ps/1ps
module variable_delay_line #(
  parameter int unsigned CODE_W = skew_pkg::CODE_W,
  parameter int unsigned TAP_PS = 100,
  parameter int unsigned MUX_PS = 500
) (
  input  logic              a,
  input  logic [CODE_W-1:0] sel,
  output logic              y
);
  localparam int unsigned TAPS = 1 << CODE_W;

  logic [TAPS-1:0] tap;

  assign tap[0] = a;
  for (genvar i = 1; i < TAPS; i++) begin : g_stage
    assign #(TAP_PS) tap[i] = tap[i-1];
  end

  assign #(MUX_PS) y = tap[sel];
endmodule
