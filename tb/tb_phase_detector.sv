// Testbench of the direction-only phase detector.
//
// Each trial raises 'sig' either before or after the reference edge by a
// random margin (and sometimes not at all), then checks that exactly one
// 'valid' pulse follows, 4 to 5 clock cycles after the reference edge, with
// 'early' telling whether 'sig' was already high at the reference edge.
`timescale 1ps/1ps
module tb_phase_detector;
  localparam int CLK_PS = 10000;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #(CLK_PS/2) clk = ~clk;

  logic ref_edge = 1'b0, sig = 1'b0;
  logic early, valid;
  int checks = 0, failures = 0;
  int n_valid = 0;
  longint t_valid;

  phase_detector dut (.clk, .rst_n, .ref_edge, .sig, .early, .valid);

  always @(posedge clk) if (valid) begin n_valid++; t_valid = $time; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_early = 0, n_late = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!valid && !early, "quiet after reset");
    for (int i = 0; i < 60; i++) begin
      automatic int mode = int'($urandom_range(2));       // 0 early, 1 late, 2 never
      automatic int margin = int'($urandom_range(3000, 50));
      automatic int v0 = n_valid;
      automatic longint t_ref;
      #($urandom_range(7000, 1));
      if (mode == 0) begin
        sig = 1'b1; #(margin); ref_edge = 1'b1; t_ref = $time;
      end else begin
        ref_edge = 1'b1; t_ref = $time;
        if (mode == 1) begin #(margin); sig = 1'b1; end
      end
      repeat (8) @(posedge clk);
      check(n_valid == v0 + 1, $sformatf("trial %0d: %0d valid pulses", i, n_valid - v0));
      check(early == (mode == 0), $sformatf("trial %0d mode %0d: early=%0d", i, mode, early));
      check(t_valid - t_ref >= 4 * CLK_PS && t_valid - t_ref <= 5 * CLK_PS + CLK_PS,
            $sformatf("trial %0d latency %0d ps", i, t_valid - t_ref));
      if (mode == 0) n_early++; else n_late++;
      ref_edge = 1'b0; sig = 1'b0;
      repeat (4) @(posedge clk);
      check(n_valid == v0 + 1, "no sample on falling edges");
    end
    check(n_early > 0 && n_late > 0, "both directions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
