// Calibration controller for a matched pair of variable delay lines.
//
// 'start' loads 'init_code' and begins a run. On every phase sample
// ('sample_valid') the code moves one step: up when the signal came early,
// down when it came late. The first sample whose direction differs from the
// one before ends the run with 'locked' set; the code stays where the
// reversal was seen, within one step of the ideal setting. If the code would
// leave 0..2**CODE_W-1 the run ends with 'at_limit' set instead. 'busy' is
// high during a run. The code changes one cycle after 'sample_valid'.
// A sample that arrives within SETTLE_CYCLES cycles of the start or of a step
// is ignored: its edges may have passed the lines before the code changed
// (a receiver along the run cannot tell when the sender's edges come).
// Locking the return to the reference by adjusting both lines in tandem, using
// only the sign of the error, and doing it once at setup follow the published scheme; the
// linear one-step search, the stop rule and the range flag are this design's
// choices. The reset is asynchronous; the assertion below also uses it, as
// its disable condition.
`timescale 1ps/1ps
module delay_ctrl #(
  parameter int unsigned CODE_W        = skew_pkg::CODE_W,
  parameter int unsigned SETTLE_CYCLES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CODE_W-1:0] init_code,
  input  logic              sample_valid,
  input  logic              early,
  output logic [CODE_W-1:0] code,
  output logic              busy,
  output logic              locked,
  output logic              at_limit
);
  import skew_pkg::*;

  localparam logic [CODE_W-1:0] CODE_MAX = '1;

  ctrl_state_e state;
  logic        have_prev;
  logic        prev_early;
  localparam int unsigned HW = $clog2(SETTLE_CYCLES + 1);
  logic [HW-1:0] hold;

  assign busy = (state == CTRL_TRACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CTRL_IDLE;
      code       <= '0;
      have_prev  <= 1'b0;
      prev_early <= 1'b0;
      locked     <= 1'b0;
      at_limit   <= 1'b0;
      hold       <= '0;
    end else if (start) begin
      hold      <= HW'(SETTLE_CYCLES);
      state     <= CTRL_TRACK;
      code      <= init_code;
      have_prev <= 1'b0;
      locked    <= 1'b0;
      at_limit  <= 1'b0;
    end else if (hold != '0) begin
      hold <= hold - 1'b1;
    end else if (state == CTRL_TRACK && sample_valid) begin
      hold       <= HW'(SETTLE_CYCLES);
      prev_early <= early;
      have_prev  <= 1'b1;
      if (have_prev && (early != prev_early)) begin
        state  <= CTRL_DONE;
        locked <= 1'b1;
      end else if (early) begin
        if (code == CODE_MAX) begin
          state    <= CTRL_DONE;
          at_limit <= 1'b1;
        end else begin
          code <= code + 1'b1;
        end
      end else begin
        if (code == '0) begin
          state    <= CTRL_DONE;
          at_limit <= 1'b1;
        end else begin
          code <= code - 1'b1;
        end
      end
    end
  end

  // A run ends in exactly one way.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n) !(locked && at_limit));
endmodule
