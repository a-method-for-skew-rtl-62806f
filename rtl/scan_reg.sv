// Boundary-scan data register of the compensation logic.
//
// A SCAN_W-bit shift register with the usual capture / shift / update
// operations, clocked by 'clk'. 'capture' loads the status word (code in
// use, locked, at_limit) so that the rest of the system can read how much
// compensation is applied; 'shift' moves the register one bit toward 'tdo'
// (bit 0 leaves first, 'tdi' enters at the top); 'update' copies the register
// into the command word. An update whose start bit is set also gives a
// one-cycle 'start' pulse. If several controls are high, capture wins over
// shift, and shift over update. Reset clears the command.
// Controlling the adjustment through boundary scan and reading the result
// back follow the published scheme; the register layout (see skew_pkg) and the
// single-clock control are this design's choices, and a full test-access-port
// state machine is outside this block.
`timescale 1ps/1ps
module scan_reg
  import skew_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         tdi,
  output logic         tdo,
  input  scan_status_t status,
  output scan_cmd_t    cmd,
  output logic         start
);
  logic [SCAN_W-1:0] sr;

  assign tdo = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      cmd   <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (capture) begin
        sr <= status;
      end else if (shift) begin
        sr <= {tdi, sr[SCAN_W-1:1]};
      end else if (update) begin
        cmd   <= scan_cmd_t'(sr);
        start <= sr[SCAN_W-1];
      end
    end
  end
endmodule
