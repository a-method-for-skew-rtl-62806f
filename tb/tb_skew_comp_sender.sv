// Testbench of the skew-compensating sender.
//
// The reference arm is modelled as a forward wire looped back at the far end
// onto a reverse wire of the same delay; one of four wire lengths (2.31 to
// 8.37 ns one way) is chosen per run. For each length the testbench starts a
// calibration through the scan chain and checks that the code is the smallest
// one whose round trip 2*(PAD + MUX + code*TAP + line) reaches the 20 ns
// reference, that the far end then sees an edge sent on any wire 10 ns later
// to within one step, whatever the wire length, and that the status read
// through the scan chain matches. The number of samples (one per 1.28 us
// calibration period) must equal the number of steps plus the final one.
`timescale 1ps/1ps
module tb_skew_comp_sender;
  import skew_pkg::*;
  localparam int N_WIRES = 2;
  localparam int REF_PS = 20000, TAP = 100, MUX = 500, PAD = 1000;
  localparam int LEN [4] = '{2310, 4040, 6170, 8370};

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #5000 clk = ~clk;

  logic [N_WIRES-1:0] data_in = '0, fwd_out;
  logic ret_in;
  logic scan_capture = 0, scan_shift = 0, scan_update = 0, scan_tdi = 0, scan_tdo;
  code_t code;
  logic busy, locked, at_limit;
  int checks = 0, failures = 0;
  int sel = 0;

  skew_comp_sender #(.N_WIRES(N_WIRES)) dut (.*);

  logic [3:0] e0, e1, r0;
  for (genvar k = 0; k < 4; k++) begin : g_len
    tb_line #(.DELAY_PS(LEN[k])) u_f0 (.a(fwd_out[0]), .y(e0[k]));
    tb_line #(.DELAY_PS(LEN[k])) u_f1 (.a(fwd_out[1]), .y(e1[k]));
    tb_line #(.DELAY_PS(LEN[k])) u_r0 (.a(e0[k]), .y(r0[k]));
  end
  assign ret_in = r0[sel];

  longint t_e0, t_e1;
  int n_samples = 0;
  always @(posedge e0[sel]) t_e0 = $time;
  always @(posedge e1[sel]) t_e1 = $time;
  always @(posedge clk) if (busy && dut.pd_valid) n_samples++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scan_xfer(input logic [SCAN_W-1:0] din, input bit cap, input bit upd,
                           output logic [SCAN_W-1:0] dout);
    @(negedge clk);
    if (cap) begin scan_capture = 1'b1; @(negedge clk); scan_capture = 1'b0; end
    for (int i = 0; i < SCAN_W; i++) begin
      dout[i] = scan_tdo; scan_tdi = din[i]; scan_shift = 1'b1;
      @(negedge clk);
    end
    scan_shift = 1'b0;
    if (upd) begin scan_update = 1'b1; @(negedge clk); scan_update = 1'b0; end
    repeat (2) @(negedge clk);
  endtask

  function automatic int exp_code(input int line);
    for (int c = 0; c < 64; c++) if (2 * (PAD + MUX + c * TAP + line) >= REF_PS) return c;
    return 63;
  endfunction

  initial begin
    logic [SCAN_W-1:0] dout;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      automatic int ec = exp_code(LEN[k]);
      automatic int init = (k == 2) ? 63 : 0;
      automatic int s0;
      automatic longint t0;
      sel = k;
      s0 = n_samples;
      scan_xfer(SCAN_W'({1'b1, 1'b0, 6'(init)}), 1'b0, 1'b1, dout);
      check(busy, "run started by scan update");
      while (busy) @(posedge clk);
      check(locked && !at_limit, $sformatf("length %0d locked", LEN[k]));
      check(int'(code) == ec || (init > ec && int'(code) == ec - 1),
            $sformatf("length %0d code %0d expected %0d", LEN[k], code, ec));
      check(n_samples - s0 == ((init > ec) ? init - int'(code) + 1 : int'(code) - init + 1),
            $sformatf("length %0d: %0d samples", LEN[k], n_samples - s0));
      // data edge on both wires
      data_in = '0; #30000; data_in = '1; t0 = $time; #30000;
      check(t_e0 - t0 >= REF_PS / 2 - TAP && t_e0 - t0 <= REF_PS / 2 + TAP,
            $sformatf("length %0d: wire 0 arrival %0d", LEN[k], t_e0 - t0));
      check(t_e1 - t0 == t_e0 - t0, "wire 1 arrives with wire 0");
      data_in = '0;
      scan_xfer('0, 1'b1, 1'b0, dout);
      check(dout == SCAN_W'({1'b0, 1'b1, code}), $sformatf("scan status %h", dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
