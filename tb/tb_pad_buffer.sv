// Testbench of the pad buffer model: edges of random spacing come out
// exactly DELAY_PS later.
`timescale 1ps/1ps
module tb_pad_buffer;
  localparam int D = 1000;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;
  longint t_in, t_out;

  pad_buffer dut (.a, .y);

  always @(posedge y or negedge y) t_out = $time;

  initial begin
    #1000;
    repeat (20) begin
      a = ~a; t_in = $time;
      #(D + 10);
      checks++;
      if (t_out - t_in != D || y != a) begin
        failures++; $display("FAIL: delay %0d", t_out - t_in);
      end
      #($urandom_range(5000, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
