// Skew-compensating sender with the two-wire calibration loop.
//
// The sender drives N_WIRES forward wires. Wire 0 and one reverse wire of the
// same electrical length form the reference arm; the far end loops the
// forward wire back onto the reverse wire. During calibration the
// calibration edge leaves through the forward variable delay line and an
// output pad, travels out and back, enters through an input pad and a second
// variable delay line with the same code, and is compared, by the
// direction-only phase detector, with the same edge passed through the
// reference delay. The controller steps the code of both lines together until
// the round trip equals the reference delay:
//   2 * (T_pd + T_line + T_delay) = REF_DELAY_PS,
// so the signal reaches the far end after REF_DELAY_PS / 2 whatever the wire
// length, to within one delay-line step.
// The forward delay lines of the other wires receive the same code, so wires
// as long as the reference arm arrive at the same time. After calibration
// wire 0 carries data_in[0] again.
// Control and read-back go through the scan register: an update with the
// start bit set begins a run from the code given; with the manual bit set,
// the code from the scan command is applied instead of the calibrated one.
// The loop structure follows the published scheme; the reuse of wire 0, the manual setting and
// all sizes are this design's choices. Reset: all registers clear, code 0.
// The start bit of the command word is used inside the scan register, which
// turns it into the start pulse; here it is left unread.
`timescale 1ps/1ps
module skew_comp_sender
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
  // data to send
  input  logic [N_WIRES-1:0] data_in,
  // line side
  output logic [N_WIRES-1:0] fwd_out,
  input  logic               ret_in,
  // scan access
  input  logic               scan_capture,
  input  logic               scan_shift,
  input  logic               scan_update,
  input  logic               scan_tdi,
  output logic               scan_tdo,
  // status
  output code_t              code,
  output logic               busy,
  output logic               locked,
  output logic               at_limit
);
  scan_cmd_t    cmd;
  scan_status_t status;
  logic         start;
  code_t        cal_code;
  logic         cal_pulse;
  logic         ref_edge;
  logic         ret_pad, ret_dly;
  logic         pd_early, pd_valid;
  logic [N_WIRES-1:0] wire_src, wire_dly;

  scan_reg u_scan (
    .clk, .rst_n,
    .capture (scan_capture), .shift (scan_shift), .update (scan_update),
    .tdi (scan_tdi), .tdo (scan_tdo),
    .status, .cmd, .start
  );

  delay_ctrl #(.CODE_W(CODE_W)) u_ctrl (
    .clk, .rst_n,
    .start, .init_code (cmd.code),
    .sample_valid (pd_valid), .early (pd_early),
    .code (cal_code), .busy, .locked, .at_limit
  );

  assign code   = cmd.manual ? cmd.code : cal_code;
  assign status = '{at_limit: at_limit, locked: locked, code: code};

  cal_pulse_gen #(.HALF_CYCLES(HALF_CYCLES)) u_pulse (
    .clk, .rst_n, .en (busy), .pulse (cal_pulse)
  );

  // Wire 0 carries the calibration signal during a run, data otherwise.
  always_comb begin
    wire_src    = data_in;
    wire_src[0] = busy ? cal_pulse : data_in[0];
  end

  for (genvar w = 0; w < N_WIRES; w++) begin : g_wire
    variable_delay_line #(.CODE_W(CODE_W), .TAP_PS(TAP_PS), .MUX_PS(MUX_PS)) u_vdl_out (
      .a (wire_src[w]), .sel (code), .y (wire_dly[w])
    );
    pad_buffer #(.DELAY_PS(PAD_PS)) u_pad_out (.a (wire_dly[w]), .y (fwd_out[w]));
  end

  // Return path: input pad, then the matched delay line.
  pad_buffer #(.DELAY_PS(PAD_PS)) u_pad_in (.a (ret_in), .y (ret_pad));
  variable_delay_line #(.CODE_W(CODE_W), .TAP_PS(TAP_PS), .MUX_PS(MUX_PS)) u_vdl_in (
    .a (ret_pad), .sel (code), .y (ret_dly)
  );

  reference_delay #(.REF_DELAY_PS(REF_DELAY_PS)) u_ref (.a (cal_pulse), .y (ref_edge));

  phase_detector u_pd (
    .clk, .rst_n, .ref_edge, .sig (ret_dly), .early (pd_early), .valid (pd_valid)
  );
endmodule
