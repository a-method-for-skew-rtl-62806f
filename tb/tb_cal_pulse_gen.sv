// Testbench of the calibration signal generator: while enabled the output
// must rise HALF_CYCLES cycles after enable and then alternate every
// HALF_CYCLES cycles; when disabled it must be low on the next cycle.
`timescale 1ps/1ps
module tb_cal_pulse_gen;
  localparam int HALF = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #5000 clk = ~clk;
  logic en = 1'b0, pulse;
  int checks = 0, failures = 0;

  cal_pulse_gen #(.HALF_CYCLES(HALF)) dut (.clk, .rst_n, .en, .pulse);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++; if (pulse) begin failures++; $display("FAIL: pulse while disabled"); end
    repeat (3) begin
      automatic int n = int'($urandom_range(6 * HALF, HALF / 2));
      @(negedge clk);
      en = 1'b1;
      for (int k = 1; k <= n; k++) begin
        @(negedge clk);
        checks++;
        if (pulse != (((k / HALF) % 2) == 1)) begin
          failures++; $display("FAIL: cycle %0d pulse %0d", k, pulse);
        end
      end
      en = 1'b0;
      @(negedge clk);
      checks++; if (pulse) begin failures++; $display("FAIL: pulse after disable"); end
      repeat ($urandom_range(5, 1)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
