// Testbench of the calibration controller.
//
// A delay line whose ideal setting lies between codes T-1 and T is modelled
// by answering every sample with early = (code < T). For random T (0..64)
// and start codes the testbench predicts the end of the run: from below it
// locks at T after T-init steps; from above at T-1 after init-T+1 steps; at
// T = 64 or T = 0 it stops at the end of the range with at_limit. It also
// checks that the code moves by one, one cycle after each sample, never
// while no sample comes, and not for a sample inside the settling window
// (SETTLE_CYCLES = 8 after a start or a step).
`timescale 1ps/1ps
module tb_delay_ctrl;
  localparam int CLK_PS = 10000;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #(CLK_PS/2) clk = ~clk;

  logic start = 0, sample_valid = 0, early = 0;
  logic [5:0] init_code = '0, code;
  logic busy, locked, at_limit;
  int checks = 0, failures = 0;
  int n_lock = 0, n_limit = 0, n_up = 0, n_down = 0, n_ignored = 0;
  localparam int SETTLE = 8;

  delay_ctrl #(.CODE_W(6)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int t, input int init);
    int steps = 0, exp_code, exp_steps;
    bit exp_lock;
    if (init < t) begin
      exp_lock = (t != 64); exp_code = (t == 64) ? 63 : t; exp_steps = exp_code - init;
    end else begin
      exp_lock = (t != 0); exp_code = (t == 0) ? 0 : t - 1; exp_steps = init - exp_code;
    end
    init_code <= 6'(init);
    start <= 1'b1; @(posedge clk); start <= 1'b0; @(posedge clk);
    check(busy && code == 6'(init) && !locked && !at_limit, "run starts from init_code");
    while (busy && steps < 200) begin
      automatic logic [5:0] code_was = code;
      // a sample inside the settling window must be ignored
      if ($urandom_range(3) == 0) begin
        early <= ~(int'(code) < t);
        sample_valid <= 1'b1; @(posedge clk); sample_valid <= 1'b0;
        n_ignored++;
      end
      repeat (SETTLE + $urandom_range(3)) begin
        @(posedge clk);
        check(code == code_was, "code moves only on a settled sample");
      end
      early <= (int'(code) < t);
      sample_valid <= 1'b1; @(posedge clk); sample_valid <= 1'b0;
      @(posedge clk);
      if (busy) begin
        check(code == code_was + 1'b1 || code == code_was - 1'b1, "one step per sample");
        if (code == code_was + 1'b1) n_up++; else n_down++;
        steps++;
      end
    end
    check(locked == exp_lock && at_limit == !exp_lock, $sformatf("T=%0d init=%0d outcome", t, init));
    check(int'(code) == exp_code, $sformatf("T=%0d init=%0d code %0d expected %0d", t, init, code, exp_code));
    check(steps == exp_steps, $sformatf("T=%0d init=%0d steps %0d expected %0d", t, init, steps, exp_steps));
    if (locked) n_lock++;
    if (at_limit) n_limit++;
    // samples after the run change nothing
    repeat (SETTLE) @(posedge clk);
    sample_valid <= 1'b1; early <= ~early; @(posedge clk); sample_valid <= 1'b0; @(posedge clk);
    check(int'(code) == exp_code && !busy, "idle after the run");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!busy && !locked && !at_limit && code == '0, "reset state");
    run(45, 0);
    run(45, 63);
    run(64, 10);
    run(0, 20);
    run(0, 0);
    repeat (40) run(int'($urandom_range(64)), int'($urandom_range(63)));
    check(n_lock > 0 && n_limit > 0 && n_up > 0 && n_down > 0 && n_ignored > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
