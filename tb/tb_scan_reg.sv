// Testbench of the compensation scan register: random status words are
// captured and shifted out bit 0 first; random command words are shifted in
// and updated, with a one-cycle start pulse when their start bit is set;
// bits shifted in leave 'tdo' SCAN_W shifts later; capture has priority.
`timescale 1ps/1ps
module tb_scan_reg;
  import skew_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #5000 clk = ~clk;
  logic capture = 0, shift = 0, update = 0, tdi = 0, tdo, start;
  scan_status_t status = '0;
  scan_cmd_t cmd;
  int checks = 0, failures = 0, n_start = 0;

  scan_reg dut (.*);

  always @(posedge clk) if (start) n_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cmd == '0 && !start, "reset");
    repeat (30) begin
      automatic logic [SCAN_W-1:0] st = SCAN_W'($urandom);
      automatic logic [SCAN_W-1:0] cw = SCAN_W'($urandom);
      automatic logic [SCAN_W-1:0] got;
      automatic int s0;
      status = st;
      capture = 1'b1; shift = 1'b1; @(negedge clk);   // capture wins
      capture = 1'b0;
      for (int i = 0; i < SCAN_W; i++) begin
        got[i] = tdo; tdi = cw[i]; shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
      check(got == st, $sformatf("status %h read %h", st, got));
      check(cmd != scan_cmd_t'(cw) || cw == SCAN_W'(cmd), "no update before update");
      s0 = n_start;
      update = 1'b1; @(negedge clk); update = 1'b0;
      check(cmd == scan_cmd_t'(cw), $sformatf("cmd %h expected %h", cmd, cw));
      @(negedge clk);
      check(n_start - s0 == int'(cw[SCAN_W-1]), "start pulse follows the start bit");
      check(!start, "start lasts one cycle");
    end
    check(n_start > 0, "some start pulse");
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
