// Testbench of the variable delay line model.
//
// For a set of codes (all of 0..63 in turn, in random order after the first
// pass) a rising and a falling edge are sent through the line and the delay
// at the output is compared with MUX_PS + code*TAP_PS, computed here.
`timescale 1ps/1ps
module tb_variable_delay_line;
  localparam int TAP = 100;
  localparam int MUX = 500;

  logic       a = 1'b0;
  logic [5:0] sel = '0;
  logic       y;
  int checks = 0, failures = 0;
  longint t_rise, t_fall;

  variable_delay_line #(.CODE_W(6), .TAP_PS(TAP), .MUX_PS(MUX)) dut (.a, .sel, .y);

  always @(posedge y) t_rise = $time;
  always @(negedge y) t_fall = $time;

  task automatic try_code(input int c);
    longint t0;
    sel = 6'(c);
    #20000;
    a = 1'b1; t0 = $time;
    #20000;
    checks++;
    if (t_rise - t0 != longint'(MUX + c * TAP)) begin
      failures++; $display("FAIL: code %0d rise delay %0d", c, t_rise - t0);
    end
    a = 1'b0; t0 = $time;
    #20000;
    checks++;
    if (t_fall - t0 != longint'(MUX + c * TAP)) begin
      failures++; $display("FAIL: code %0d fall delay %0d", c, t_fall - t0);
    end
  endtask

  initial begin
    #10000;
    for (int c = 0; c < 64; c++) try_code(c);
    repeat (32) try_code(int'($urandom_range(63)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
