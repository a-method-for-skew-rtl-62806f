// End-to-end testbench of the skew-compensation top at its default sizes.
//
// Board model: four forward wires of 4.04 ns from the sender; wire 0 is
// looped back at the far end onto a reverse wire of the same length, which
// returns to the sender (or, with 'long_line', through 12 ns more, a line too
// long for the delay range). A receiver along wire 0 taps the forward and
// reverse wires either 1.53 ns from the sender (tap A) or 0.2 ns from the
// far end (tap B, too close for the minimum delay of the lines).
// Expected codes and arrival times are computed here from the delay model:
// line delay = MUX_PS + code*TAP_PS, pads PAD_PS each.
// Sequence and what each step shows:
//   1 calibration from code 0 (steps up, locks) with the receiver at tap A
//     locking at the same time; scan read-back of code and status;
//     PWM duty of the code;
//   2 data on all wires, wire 0 reused: far-end arrival = REF/2 within one
//     step; receiver output aligned with the far-end receiver within one step;
//   3 calibration from code 63 (steps down, locks);
//   4 long line: the sender's code runs out of range;
//   5 receiver at tap B: its code runs out of range;
//   6 manual code through scan; data delay follows it;
//   7 one-wire mode: wire 0 is modelled as a series-terminated line with a
//     high-impedance far end, whose driver-side voltage steps to half swing
//     and, one round trip later, to full swing; calibration through the
//     reflection detector must give the same code and far-end timing.
`timescale 1ps/1ps
module tb_skew_comp_top;
  import skew_pkg::*;

  localparam int N_WIRES = 4;
  localparam int REF_PS  = 20000;
  localparam int TAP     = 100;
  localparam int MUX     = 500;
  localparam int PAD     = 1000;
  localparam int T1      = 1530;   // sender to tap A
  localparam int T2A     = 2310;   // tap A to tap B
  localparam int T2B     = 200;    // tap B to far end
  localparam int TLINE   = T1 + T2A + T2B;
  localparam int TLONG   = 12000;
  localparam int CLK_PS  = 10000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge resets the asynchronous flops
  always #(CLK_PS/2) clk = ~clk;

  logic [N_WIRES-1:0] data_in = '0;
  logic [N_WIRES-1:0] fwd_out;
  logic ret_in;
  logic scan_capture = 0, scan_shift = 0, scan_update = 0, scan_tdi = 0, scan_tdo;
  code_t code, dr_code;
  logic busy, locked, at_limit, vctl_pwm;
  logic dr_start = 0;
  code_t dr_init_code = '0;
  logic dr_fwd_in, dr_rev_in, dr_sig_out, dr_busy, dr_locked, dr_at_limit;

  logic long_line = 0, dr_sel_b = 0;
  logic one_wire = 1'b0;
  real  line0_v;
  logic line0_incident;

  skew_comp_top dut (.*);

  // ---------------- board ----------------
  logic [N_WIRES-1:0] end_f, r_sig;
  logic fA, fB, rB, rA, ret_short, ret_long;

  tb_line #(.DELAY_PS(T1))  u_w0a (.a(fwd_out[0]), .y(fA));
  tb_line #(.DELAY_PS(T2A)) u_w0b (.a(fA), .y(fB));
  tb_line #(.DELAY_PS(T2B)) u_w0c (.a(fB), .y(end_f[0]));
  tb_line #(.DELAY_PS(T2B)) u_r0c (.a(end_f[0]), .y(rB));
  tb_line #(.DELAY_PS(T2A)) u_r0b (.a(rB), .y(rA));
  tb_line #(.DELAY_PS(T1))  u_r0a (.a(rA), .y(ret_short));
  tb_line #(.DELAY_PS(TLONG)) u_rl (.a(ret_short), .y(ret_long));
  for (genvar w = 1; w < N_WIRES; w++) begin : g_w
    tb_line #(.DELAY_PS(TLINE)) u_w (.a(fwd_out[w]), .y(end_f[w]));
  end
  for (genvar w = 0; w < N_WIRES; w++) begin : g_r
    pad_buffer #(.DELAY_PS(PAD)) u_rpad (.a(end_f[w]), .y(r_sig[w]));
  end
  assign ret_in    = long_line ? ret_long : ret_short;

  // one-wire view of wire 0: outgoing step plus its reflection 2*TLINE later
  logic d_rt;
  tb_line #(.DELAY_PS(2 * TLINE)) u_rt (.a(fwd_out[0]), .y(d_rt));
  always_comb line0_v = 0.5 * (real'(fwd_out[0]) + real'(d_rt));
  assign dr_fwd_in = dr_sel_b ? fB : fA;
  assign dr_rev_in = dr_sel_b ? rB : rA;

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_step_up = 0, n_step_down = 0, n_lock = 0, n_limit = 0;
  int n_dr_lock = 0, n_dr_limit = 0, n_scan_read = 0, n_manual = 0, n_reuse = 0, n_pwm = 0;
  int n_one_wire = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  code_t prev_code;
  logic prev_locked, prev_limit, prev_dr_locked, prev_dr_limit;
  always @(posedge clk) begin
    if (rst_n && busy && code == prev_code + 1'b1) n_step_up++;
    if (rst_n && busy && code == prev_code - 1'b1) n_step_down++;
    if (locked && !prev_locked) n_lock++;
    if (at_limit && !prev_limit) n_limit++;
    if (dr_locked && !prev_dr_locked) n_dr_lock++;
    if (dr_at_limit && !prev_dr_limit) n_dr_limit++;
    prev_code <= code; prev_locked <= locked; prev_limit <= at_limit;
    prev_dr_locked <= dr_locked; prev_dr_limit <= dr_at_limit;
  end

  longint t_end [N_WIRES];
  longint t_r0, t_dr;
  for (genvar w = 0; w < N_WIRES; w++) begin : g_t
    always @(posedge end_f[w]) t_end[w] = $time;
  end
  always @(posedge r_sig[0]) t_r0 = $time;
  always @(posedge dr_sig_out) t_dr = $time;

  // ---------------- expected values ----------------
  // Smallest code whose round trip reaches the reference delay.
  function automatic int exp_sender_code(input int tline);
    for (int c = 0; c < 64; c++)
      if (2 * (PAD + MUX + c * TAP + tline) >= REF_PS) return c;
    return 63;
  endfunction
  // Smallest code whose two line delays reach the incident-to-return spacing.
  function automatic int exp_dr_code(input int spacing);
    for (int c = 0; c < 64; c++)
      if (2 * (MUX + c * TAP) >= spacing) return c;
    return 63;
  endfunction
  function automatic longint absl(input longint v);
    return v < 0 ? -v : v;
  endfunction

  // ---------------- scan access ----------------
  task automatic scan_write(input scan_cmd_t c);
    logic [SCAN_W-1:0] v = c;
    for (int i = 0; i < SCAN_W; i++) begin
      scan_tdi <= v[i]; scan_shift <= 1'b1;
      @(posedge clk);
    end
    scan_shift <= 1'b0; scan_update <= 1'b1;
    @(posedge clk);
    scan_update <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  task automatic scan_read(output scan_status_t s);
    logic [SCAN_W-1:0] v;
    @(negedge clk);
    scan_capture = 1'b1;
    @(negedge clk);
    scan_capture = 1'b0;
    for (int i = 0; i < SCAN_W; i++) begin
      v[i] = scan_tdo;
      scan_shift = 1'b1;
      @(negedge clk);
    end
    scan_shift = 1'b0;
    s = v;
  endtask

  task automatic wait_idle(input int max_cycles);
    int n = 0;
    @(posedge clk);
    while (busy && n < max_cycles) begin @(posedge clk); n++; end
  endtask

  task automatic cal_run(input code_t init);
    scan_write('{start: 1'b1, manual: 1'b0, code: init});
    check(busy == 1'b1, "sender busy after start");
    wait_idle(20000);
  endtask

  // Drive a rising edge on all data wires and return its time.
  task automatic send_edge(output longint t0);
    data_in = '0;
    #50000;
    data_in = '1;
    t0 = $time;
    #50000;
  endtask

  initial begin
    scan_status_t st;
    longint t0;
    int ec, edc, s_up0, s_dn0;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    scan_read(st);
    check(st == '0, "status after reset is zero");

    // 1: calibration from code 0; receiver at tap A at the same time.
    ec  = exp_sender_code(TLINE);
    edc = exp_dr_code(2 * (T2A + T2B));
    dr_init_code = '0;
    dr_start <= 1'b1; @(posedge clk); dr_start <= 1'b0;
    s_up0 = n_step_up;
    cal_run(6'd0);
    check(locked && !at_limit, "sender locked from code 0");
    check(int'(code) == ec, $sformatf("sender code %0d, expected %0d", code, ec));
    check(n_step_up - s_up0 == ec, $sformatf("steps up %0d, expected %0d", n_step_up - s_up0, ec));
    check(dr_locked && !dr_at_limit, "receiver locked at tap A");
    check(int'(dr_code) == edc, $sformatf("receiver code %0d, expected %0d", dr_code, edc));

    scan_read(st);
    check(st.code == code && st.locked && !st.at_limit, "scan read-back after lock");
    n_scan_read++;

    // PWM: high for 'code' cycles of every 64.
    begin
      automatic int hi = 0;
      repeat (64) @(posedge clk);
      repeat (64) begin @(posedge clk); hi += vctl_pwm; end
      check(hi == int'(code), $sformatf("PWM high %0d cycles, code %0d", hi, code));
      n_pwm++;
    end

    // 2: data, wire 0 reused after calibration.
    send_edge(t0);
    for (int w = 0; w < N_WIRES; w++) begin
      check(t_end[w] - t0 == longint'(PAD + MUX + int'(code) * TAP + TLINE),
            $sformatf("wire %0d arrival %0d", w, t_end[w] - t0));
      check(absl(t_end[w] - t0 - REF_PS / 2) <= TAP,
            $sformatf("wire %0d arrival %0d not at half of the reference", w, t_end[w] - t0));
    end
    n_reuse++;
    check(absl(t_dr - t_r0) <= TAP,
          $sformatf("receiver output %0d ps from the far end", t_dr - t_r0));
    check(t_dr > t0 && t_r0 > t0, "receiver and far end both saw the edge");

    // 3: calibration from the top of the range steps down.
    s_dn0 = n_step_down;
    cal_run(6'd63);
    check(locked && !at_limit, "sender locked from code 63");
    check(int'(code) == ec || int'(code) == ec - 1, $sformatf("code %0d from above", code));
    check(n_step_down - s_dn0 == 63 - int'(code), "steps down from 63");

    // 4: long line, out of range.
    long_line = 1'b1;
    cal_run(6'd30);
    check(at_limit && !locked && code == '0, "long line: sender at limit");
    scan_read(st);
    check(st.at_limit && !st.locked, "scan read-back of the limit");
    n_scan_read++;
    long_line = 1'b0;

    // 5: receiver next to the far end, too close for its minimum delay.
    dr_sel_b = 1'b1;
    dr_init_code = 6'd5;
    dr_start <= 1'b1; @(posedge clk); dr_start <= 1'b0;
    cal_run(6'd0);
    check(dr_at_limit && !dr_locked && dr_code == '0, "receiver at tap B at limit");
    check(locked, "sender locked again");
    dr_sel_b = 1'b0;

    // 6: manual code through scan.
    scan_write('{start: 1'b0, manual: 1'b1, code: 6'd10});
    check(code == 6'd10, "manual code applied");
    send_edge(t0);
    check(t_end[1] - t0 == longint'(PAD + MUX + 10 * TAP + TLINE), "manual code sets the wire delay");
    n_manual++;

    // 7: one-wire calibration through the reflection detector.
    one_wire = 1'b1;
    cal_run(6'd0);
    check(locked && !at_limit, "one-wire run locked");
    check(int'(code) == ec, $sformatf("one-wire code %0d, expected %0d", code, ec));
    send_edge(t0);
    check(absl(t_end[0] - t0 - REF_PS / 2) <= TAP,
          $sformatf("one-wire: far-end arrival %0d", t_end[0] - t0));
    check(line0_incident, "incident step seen");
    n_one_wire++;
    one_wire = 1'b0;

    // Every mechanism must have happened.
    check(n_step_up > 0,   "no step up seen");
    check(n_step_down > 0, "no step down seen");
    check(n_lock > 0,      "no lock seen");
    check(n_limit > 0,     "no sender limit seen");
    check(n_dr_lock > 0,   "no receiver lock seen");
    check(n_dr_limit > 0,  "no receiver limit seen");
    check(n_scan_read > 0 && n_manual > 0 && n_reuse > 0 && n_pwm > 0, "scan, manual, reuse, pwm");
    check(n_one_wire > 0,  "no one-wire run");
    $display("mechanisms: step_up=%0d step_down=%0d lock=%0d limit=%0d dr_lock=%0d dr_limit=%0d scan_read=%0d manual=%0d wire_reuse=%0d pwm=%0d one_wire=%0d",
             n_step_up, n_step_down, n_lock, n_limit, n_dr_lock, n_dr_limit, n_scan_read, n_manual, n_reuse, n_pwm, n_one_wire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
