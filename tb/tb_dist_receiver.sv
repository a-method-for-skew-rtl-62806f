// Testbench of the deskewing receiver along the run.
//
// The testbench plays the line: every 1.28 us it raises the incident input
// and, S ps later, the returned input (S random per run), as the sender's
// calibration edges would appear at the receiver. After a run the code must
// be the smallest one whose two line delays cover S, and the middle-tap output
// must rise within one step after the midpoint of the two edges plus the pad
// delay, the time the far end sees the edge. Spacings below two minimum line
// delays must end with at_limit.
`timescale 1ps/1ps
module tb_dist_receiver;
  import skew_pkg::*;
  localparam int TAP = 100, MUX = 500, PAD = 1000;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #5000 clk = ~clk;

  logic start = 0, fwd_in = 0, rev_in = 0, sig_out, busy, locked, at_limit;
  code_t init_code = '0, code;
  int checks = 0, failures = 0, n_lock = 0, n_limit = 0;
  int spacing = 5000;
  longint t_fwd, t_out;

  dist_receiver dut (.*);

  always @(posedge sig_out) t_out = $time;

  // the line: periodic edge pairs
  initial begin
    #3000;
    forever begin
      fwd_in = 1'b1; t_fwd = $time;
      #(spacing);
      rev_in = 1'b1;
      #(640000 - spacing);
      fwd_in = 1'b0; rev_in = 1'b0;
      #640000;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int exp_code(input int s);
    for (int c = 0; c < 64; c++) if (2 * (MUX + c * TAP) >= s) return c;
    return 63;
  endfunction

  task automatic run(input int s, input int init);
    int n = 0;
    int ec = exp_code(s);
    spacing = s;
    init_code <= 6'(init);
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    @(posedge clk);
    while (busy && n < 20000) begin @(posedge clk); n++; end
    if (s < 2 * MUX) begin
      check(at_limit && !locked && code == '0, $sformatf("S=%0d should hit the limit", s));
      n_limit++;
    end else begin
      check(locked && !at_limit, $sformatf("S=%0d locked", s));
      check(int'(code) == ec || (init > ec && int'(code) == ec - 1),
            $sformatf("S=%0d init=%0d code %0d expected %0d", s, init, code, ec));
      @(posedge fwd_in); #(s + 10000);
      check(t_out - t_fwd - s / 2 - PAD >= -TAP && t_out - t_fwd - s / 2 - PAD <= TAP,
            $sformatf("S=%0d output %0d ps off the far-end time", s, t_out - t_fwd - s / 2 - PAD));
      n_lock++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run(5030, 0);
    run(9870, 63);
    run(700, 10);
    repeat (6) run(int'($urandom_range(13000, 1100)) | 1, int'($urandom_range(63)));
    check(n_lock > 0 && n_limit > 0, "lock and limit both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
