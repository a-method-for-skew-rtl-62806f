// Testbench of the two-threshold reflection detector.
//
// Random line voltages between 0 and full swing must give incident =
// (v > 0.25) and reflected = (v > 0.75). Then a series-terminated line of
// random delay is modelled (driver step to half swing, full swing one round
// trip later): 'incident' must rise with the driver and 'reflected' exactly
// one round trip later.
`timescale 1ps/1ps
module tb_reflection_detector;
  real  v_line = 0.0;
  logic incident, reflected;
  int checks = 0, failures = 0;

  reflection_detector dut (.v_line, .incident, .reflected);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint t_inc, t_ref;
  always @(posedge incident)  t_inc = $time;
  always @(posedge reflected) t_ref = $time;

  initial begin
    #1000;
    repeat (200) begin
      automatic real v = real'($urandom_range(1000)) / 1000.0;
      v_line = v;
      #10;
      check(incident == (v > 0.25) && reflected == (v > 0.75),
            $sformatf("v=%f incident=%0d reflected=%0d", v, incident, reflected));
    end
    repeat (20) begin
      automatic int rt = int'($urandom_range(20000, 500));
      automatic longint t0;
      v_line = 0.0; #5000;
      v_line = 0.5; t0 = $time;
      #(rt);
      v_line = 1.0;
      #100;
      check(t_inc == t0, "incident step at launch");
      check(t_ref - t0 == longint'(rt), $sformatf("reflected after %0d, round trip %0d", t_ref - t0, rt));
    end
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
