// tb_up_pulse_selector: self-checking test of the UP pulse selector.
//
// A cycle-level reference model kept in integers (window ticks since the
// last restart, pulses counted, CLK/8 phase since R) runs beside the DUT
// and every output (UP_F, SL_UP, RS, N_UP) is compared every cycle.
// Directed phases cover: the 128 T_CK window with no pulses in band 3
// (SL_UP must rise exactly 128 cycles after R), a large error in band 3
// (pulses every 4 cycles: window keeps restarting, UP_F2 passed), the
// error falling below 8 per window (SL_UP rises, UP_F1 passed), the same
// in band 2 with its threshold 20, band 1 (never widened), and STOP low
// (nothing counted). Random pulse trains follow.
module tb_up_pulse_selector;
  logic clk = 1'b0;
  logic r, stop, d0, d1, up_f1;
  logic up_f, up_f2, sl_up, rs;
  logic [4:0] n_up;
  int checks = 0, failures = 0;

  up_pulse_selector dut (
    .clk(clk), .r(r), .stop(stop), .d0(d0), .d1(d1), .up_f1(up_f1),
    .up_f(up_f), .up_f2(up_f2), .sl_up(sl_up), .rs(rs), .n_up(n_up)
  );

  always #5 clk = ~clk;

  // Reference model state.
  int  m_phase, m_win, m_nup;
  bit  m_prev, m_f2;
  int  rs_count, sl_rise_count;

  function automatic bit m_rs();
    return r || (d1 && m_nup >= 8) || (d0 && m_nup >= 20);
  endfunction
  function automatic bit m_sl();
    return (d0 || d1) && (m_win >= 16);
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // One clock cycle: drive inputs, compare, step the model.
  task automatic cycle(bit ir, bit istop, bit id0, bit id1, bit iup);
    bit rise, e, nrs, sl;
    @(negedge clk);
    r = ir; stop = istop; d0 = id0; d1 = id1; up_f1 = iup;
    #1;
    nrs  = m_rs();
    sl   = m_sl();
    rise = up_f1 && !m_prev;
    e    = stop && (m_win < 16);
    check("rs", rs, nrs);
    check("sl_up", sl_up, sl);
    check("up_f", up_f, (sl || !(d0 || d1)) ? up_f1 : m_f2);
    checks++;
    if (n_up != 5'(m_nup)) begin
      failures++;
      if (failures < 20) $display("FAIL n_up at %0t: got %0d expected %0d", $time, n_up, m_nup);
    end
    if (nrs && !r) rs_count++;
    @(posedge clk);
    // model update with pre-edge values
    if (r) begin
      m_phase = 0; m_prev = 0; m_f2 = 0;
    end else begin
      m_phase = (m_phase + 1) % 8;
      if (rise) m_f2 = !m_f2;
      m_prev = up_f1;
    end
    if (nrs) begin
      m_win = 0; m_nup = 0;
    end else begin
      if (e && m_phase == 0) m_win++;   // phase wrapped from 7
      if (e && rise && m_nup < 31) m_nup++;
    end
  endtask

  task automatic do_reset();
    repeat (3) cycle(1, 0, 0, 0, 0);
  endtask

  // Pulse train: high for 'w' cycles every 'per' cycles.
  task automatic train(int n, int per, int w, bit b0, bit b1, bit st = 1);
    for (int i = 0; i < n; i++) cycle(0, st, b0, b1, (i % per) < w);
  endtask

  initial begin
    int t_sl;
    bit sl_prev;
    m_phase = 0; m_win = 0; m_nup = 0; m_prev = 0; m_f2 = 0;
    rs_count = 0;
    r = 1; stop = 0; d0 = 0; d1 = 0; up_f1 = 0;
    do_reset();

    // 1) band 3, no pulses: SL_UP exactly 128 cycles after R falls.
    t_sl = -1;
    for (int i = 0; i < 200; i++) begin
      cycle(0, 1, 0, 1, 0);
      if (t_sl < 0 && sl_up) t_sl = i;
    end
    checks++;
    if (t_sl != 128) begin
      failures++;
      $display("FAIL window length: SL_UP seen in cycle %0d after R, expected 128", t_sl);
    end

    // 2) band 3, large error: window restarts, UP_F2 selected, no SL_UP.
    do_reset();
    rs_count = 0;
    train(2000, 4, 1, 0, 1);
    check("band3 large error keeps SL_UP low", sl_up, 1'b0);
    checks++;
    if (rs_count < 50) begin
      failures++;
      $display("FAIL band 3: only %0d window restarts", rs_count);
    end
    // UP_F2 stays high from one UP_F1 pulse to the next (Fig. 5 behaviour).
    check("up_f is up_f2", up_f, up_f2);

    // 3) band 3, error drops to 1 pulse per 20 cycles (6.4 per window).
    sl_prev = 0;
    for (int i = 0; i < 400; i++) begin
      cycle(0, 1, 0, 1, (i % 20) == 0);
      if (sl_up && !sl_prev) sl_rise_count++;
      sl_prev = sl_up;
    end
    check("band3 small error raises SL_UP", sl_up, 1'b1);

    // 4) band 2: 1 pulse per 5 cycles (25.6 / window) keeps widening,
    //    1 per 8 (16 / window, below 20) stops it.
    do_reset();
    train(1000, 5, 2, 1, 0);
    check("band2 large error keeps SL_UP low", sl_up, 1'b0);
    train(400, 8, 2, 1, 0);
    check("band2 below 20 raises SL_UP", sl_up, 1'b1);

    // 5) band 1: never widened, SL_UP never set.
    do_reset();
    train(600, 6, 2, 0, 0);
    check("band1 SL_UP low", sl_up, 1'b0);

    // 6) STOP low: nothing counted.
    do_reset();
    train(300, 3, 1, 0, 1, 0);
    checks++;
    if (n_up != 0) begin failures++; $display("FAIL: counted with STOP low"); end

    // 7) random trains in bands 2 and 3.
    for (int k = 0; k < 20; k++) begin
      automatic bit b = k[0];
      do_reset();
      for (int i = 0; i < 500; i++)
        cycle(0, ($urandom % 16) != 0, b, !b, ($urandom % 100) < (5 + 3 * k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
