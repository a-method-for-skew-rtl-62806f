// Deskewing receiver for a point along the signal run.
//
// A receiver between the sender and the far end sees each edge twice: on its
// way out ('fwd_in') and on its way back ('rev_in'). The far end receives it
// exactly halfway between the two. The incident signal passes through two
// matched variable delay lines in series, and a direction-only phase
// detector, clocked by the returned signal, compares the output of the second
// line with it. The controller steps the common code until the two coincide;
// the tap between the lines ('sig_out') then carries the signal with the
// timing it has at the far end (both inputs pass through identical input
// pads, so the far end is meant after its own input pad). The receiver only
// observes: it needs the sender to be sending its calibration edges while it
// runs. 'start' loads 'init_code' and begins a run; 'locked' or 'at_limit'
// ends it. The incident and returned edges must be at least two minimum
// line delays apart, so the receiver cannot sit too close to the far end.
// The circuit follows the published scheme; sizes and control are this design's choices.
`timescale 1ps/1ps
module dist_receiver
  import skew_pkg::*;
#(
  parameter int unsigned TAP_PS = 100,
  parameter int unsigned MUX_PS = 500,
  parameter int unsigned PAD_PS = 1000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  code_t init_code,
  input  logic  fwd_in,
  input  logic  rev_in,
  output logic  sig_out,
  output code_t code,
  output logic  busy,
  output logic  locked,
  output logic  at_limit
);
  logic fwd_pad, rev_pad, dly2;
  logic pd_early, pd_valid;

  pad_buffer #(.DELAY_PS(PAD_PS)) u_pad_fwd (.a (fwd_in), .y (fwd_pad));
  pad_buffer #(.DELAY_PS(PAD_PS)) u_pad_rev (.a (rev_in), .y (rev_pad));

  variable_delay_line #(.CODE_W(CODE_W), .TAP_PS(TAP_PS), .MUX_PS(MUX_PS)) u_vdl_a (
    .a (fwd_pad), .sel (code), .y (sig_out)
  );
  variable_delay_line #(.CODE_W(CODE_W), .TAP_PS(TAP_PS), .MUX_PS(MUX_PS)) u_vdl_b (
    .a (sig_out), .sel (code), .y (dly2)
  );

  phase_detector u_pd (
    .clk, .rst_n, .ref_edge (rev_pad), .sig (dly2), .early (pd_early), .valid (pd_valid)
  );

  delay_ctrl #(.CODE_W(CODE_W)) u_ctrl (
    .clk, .rst_n, .start, .init_code,
    .sample_valid (pd_valid), .early (pd_early),
    .code, .busy, .locked, .at_limit
  );
endmodule
