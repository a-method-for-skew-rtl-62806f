// Direction-only phase detector.
//
// An edge-triggered register samples 'sig' on each rising edge of 'ref_edge'.
// If 'sig' is already high when the reference edge arrives, the signal came
// early and more delay is needed ('early' = 1); otherwise it came late. Only
// the sign of the phase error is reported, because calibration is a one-time
// search and never has to track a moving signal. A toggle register clocked
// by the same edge marks each new sample. Both registers are brought into the
// 'clk' domain through two-flop synchronizers; 'valid' pulses for one 'clk'
// cycle 3 to 4 cycles after each reference edge, and 'early' holds the result
// of that sample until the next one. The result takes one synchronizer stage
// more than the toggle, so it is settled when 'valid' is seen.
// The edge-triggered sampling register is the circuit the scheme proposes; the
// synchronizers and the sample-marking toggle are this design's additions.
`timescale 1ps/1ps
module phase_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_edge,
  input  logic sig,
  output logic early,
  output logic valid
);
  logic smp, tgl;
  logic [1:0] smp_s;
  logic [3:0] tgl_s;

  // Sampling register in the reference-edge domain.
  always_ff @(posedge ref_edge or negedge rst_n) begin
    if (!rst_n) begin
      smp <= 1'b0;
      tgl <= 1'b0;
    end else begin
      smp <= sig;
      tgl <= ~tgl;
    end
  end

  // Synchronizers into the system clock domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_s <= '0;
      tgl_s <= '0;
      early <= 1'b0;
      valid <= 1'b0;
    end else begin
      smp_s <= {smp_s[0], smp};
      tgl_s <= {tgl_s[2:0], tgl};
      valid <= tgl_s[2] ^ tgl_s[3];
      early <= (tgl_s[2] ^ tgl_s[3]) ? smp_s[1] : early;
    end
  end
endmodule
