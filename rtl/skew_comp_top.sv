// Skew-free signal distribution: chip-level top.
//
// Brings together the two compensating circuits of the scheme: a sender that
// calibrates its outgoing wires by locking the round trip of a reference arm
// to a reference delay (skew_comp_sender), and a receiver placed along a
// wire that recovers the far-end timing from the incident and returned
// edges (dist_receiver). In a system they sit on different chips on the same
// run; here they stand side by side with their own ports, and the wires
// between them are outside. The sender's code is also given out in PWM form
// (pwm_dac) for delay lines that take an analog control voltage.
// The sender's return signal comes either from the reverse wire ('ret_in',
// two-wire calibration) or, with 'one_wire' high, from the reflection
// detector watching the voltage 'line0_v' at the wire end of wire 0's series
// termination: the second step of that voltage arrives one round trip after
// the first, so no reverse wire is needed. 'one_wire' must be steady during a
// run.
// All timing and sizes are parameters; their defaults are this design's
// choices.
`timescale 1ps/1ps
module skew_comp_top
  import skew_pkg::*;
#(
  parameter int unsigned N_WIRES      = 4,
  parameter int unsigned REF_DELAY_PS = 20000,
  parameter int unsigned HALF_CYCLES  = 64,
  parameter int unsigned TAP_PS       = 100,
  parameter int unsigned MUX_PS       = 500,
  parameter int unsigned PAD_PS       = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  // sender
  input  logic [N_WIRES-1:0] data_in,
  output logic [N_WIRES-1:0] fwd_out,
  input  logic               ret_in,
  input  logic               one_wire,
  input  real                line0_v,
  output logic               line0_incident,
  input  logic               scan_capture,
  input  logic               scan_shift,
  input  logic               scan_update,
  input  logic               scan_tdi,
  output logic               scan_tdo,
  output code_t              code,
  output logic               busy,
  output logic               locked,
  output logic               at_limit,
  output logic               vctl_pwm,
  // distributed receiver
  input  logic               dr_start,
  input  code_t              dr_init_code,
  input  logic               dr_fwd_in,
  input  logic               dr_rev_in,
  output logic               dr_sig_out,
  output code_t              dr_code,
  output logic               dr_busy,
  output logic               dr_locked,
  output logic               dr_at_limit
);
  logic line0_reflected, sender_ret;

  reflection_detector u_refl (
    .v_line (line0_v), .incident (line0_incident), .reflected (line0_reflected)
  );

  assign sender_ret = one_wire ? line0_reflected : ret_in;

  skew_comp_sender #(
    .N_WIRES (N_WIRES), .REF_DELAY_PS (REF_DELAY_PS), .HALF_CYCLES (HALF_CYCLES),
    .TAP_PS (TAP_PS), .MUX_PS (MUX_PS), .PAD_PS (PAD_PS)
  ) u_sender (
    .clk, .rst_n, .data_in, .fwd_out, .ret_in (sender_ret),
    .scan_capture, .scan_shift, .scan_update, .scan_tdi, .scan_tdo,
    .code, .busy, .locked, .at_limit
  );

  pwm_dac #(.CODE_W(CODE_W)) u_pwm (.clk, .rst_n, .code, .pwm (vctl_pwm));

  dist_receiver #(.TAP_PS (TAP_PS), .MUX_PS (MUX_PS), .PAD_PS (PAD_PS)) u_dr (
    .clk, .rst_n, .start (dr_start), .init_code (dr_init_code),
    .fwd_in (dr_fwd_in), .rev_in (dr_rev_in), .sig_out (dr_sig_out),
    .code (dr_code), .busy (dr_busy), .locked (dr_locked), .at_limit (dr_at_limit)
  );
endmodule
