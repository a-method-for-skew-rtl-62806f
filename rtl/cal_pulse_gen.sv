// Calibration signal generator.
//
// While 'en' is high, 'pulse' is a square wave that stays high for
// HALF_CYCLES clock cycles and low for HALF_CYCLES: sharp, registered edges at
// a low repetition rate, so that each returned edge can be told apart from
// the next one. When 'en' falls the output returns low and the count restarts.
// The first rising edge comes HALF_CYCLES cycles after 'en' rises, which lets
// a new delay setting settle. A calibration signal of short transition time
// and low repetition rate is what the scheme asks for; the square wave and its
// period are this design's choices. HALF_CYCLES times the clock period must
// exceed the reference delay plus the phase detector's latency.
`timescale 1ps/1ps
module cal_pulse_gen #(
  parameter int unsigned HALF_CYCLES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic pulse
);
  localparam int unsigned CW = $clog2(HALF_CYCLES) + 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (!en) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else if (cnt == CW'(HALF_CYCLES - 1)) begin
      cnt   <= '0;
      pulse <= ~pulse;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
