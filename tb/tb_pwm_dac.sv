// Testbench of the PWM converter: for each code the output must be high for
// exactly the first 'code' cycles of every 64-cycle period; a code change in
// the middle of a period takes effect at the next period.
`timescale 1ps/1ps
module tb_pwm_dac;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #5000 clk = ~clk;
  logic [5:0] code = '0;
  logic pwm;
  int checks = 0, failures = 0;

  pwm_dac #(.CODE_W(6)) dut (.clk, .rst_n, .code, .pwm);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 24; r++) begin
      automatic int c = (r == 0) ? 0 : (r == 1) ? 63 : int'($urandom_range(63));
      code = 6'(c);
      // align to a period start: the counter wraps to 0
      while (dut.cnt != '1) @(negedge clk);
      @(negedge clk);
      for (int k = 0; k < 64; k++) begin
        checks++;
        if (pwm != (k < c)) begin failures++; $display("FAIL: code %0d cycle %0d pwm %0d", c, k, pwm); end
        if (k == 32) code = 6'($urandom_range(63));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
