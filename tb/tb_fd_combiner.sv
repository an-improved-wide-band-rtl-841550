// tb_fd_combiner: self-checking test of the coarse/fine pulse combiner.
//
// Random UP_C, DN_C, UP_F, DN_F are applied every cycle. The expected
// STOP is tracked separately (set one edge after UP_C is first seen high,
// cleared by R) and the expected UP_FD / DN_FD follow the two rules:
// STOP low: UP_FD = UP_F, DN_FD = DN_F | DN_C;
// STOP high: UP_FD = UP_F | UP_C, DN_FD = DN_F.
// Both STOP states are required to occur.
module tb_fd_combiner;
  logic clk = 1'b0;
  logic r, up_c, dn_c, up_f, dn_f;
  logic up_fd, dn_fd, stop;
  int checks = 0, failures = 0;
  int n_stop_hi = 0, n_stop_lo = 0;
  bit m_stop;

  fd_combiner dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    m_stop = 0;
    r = 1; up_c = 0; dn_c = 0; up_f = 0; dn_f = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      r    = (i < 2) || (($urandom % 97) == 0);
      up_c = ($urandom % 23) == 0;
      dn_c = ($urandom % 3) == 0;
      up_f = ($urandom % 2) == 0;
      dn_f = ($urandom % 2) == 0;
      #1;
      check("stop", stop, m_stop);
      if (m_stop) begin
        n_stop_hi++;
        check("up_fd (stop)", up_fd, up_f | up_c);
        check("dn_fd (stop)", dn_fd, dn_f);
      end else begin
        n_stop_lo++;
        check("up_fd", up_fd, up_f);
        check("dn_fd", dn_fd, dn_f | dn_c);
      end
      @(posedge clk);
      m_stop = r ? 1'b0 : (m_stop | up_c);
    end
    checks++;
    if (n_stop_hi < 100 || n_stop_lo < 100) begin
      failures++;
      $display("FAIL: STOP states not both exercised (%0d/%0d)", n_stop_hi, n_stop_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
