// Pulse-width-modulation D/A converter for the delay code.
//
// A free-running CODE_W-bit counter is compared with 'code': 'pwm' is high
// while the counter is below the code, so over each period of 2**CODE_W
// clock cycles it is high for exactly 'code' cycles. Low-pass filtered, its
// average is an analog control voltage proportional to the code, for delay
// lines controlled by a voltage. The code is sampled at the start of each
// period so that a change never gives a partial period. Using PWM for this
// conversion is suggested by the scheme; counter-compare form and the per-period
// sampling are this design's choices.
`timescale 1ps/1ps
module pwm_dac #(
  parameter int unsigned CODE_W = skew_pkg::CODE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code,
  output logic              pwm
);
  logic [CODE_W-1:0] cnt;
  logic [CODE_W-1:0] duty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      duty <= '0;
      pwm  <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty <= code;
      pwm <= (cnt == '1) ? (code != '0) : ((cnt + 1'b1) < duty);
    end
  end
endmodule
