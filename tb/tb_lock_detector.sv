// tb_lock_detector: checks LOCK and LLD.
//
//  * LOCK rises on exactly the 256th consecutive cycle with UP_FD and
//    DN_FD low, and not before band selection is done (en).
//  * Any FD activity restarts the quiet count.
//  * Coarse pulses before LOCK give no LLD; after LOCK a rising edge of
//    UP_C or of DN_C gives one LLD pulse of one cycle.
//  * R clears LOCK.
module tb_lock_detector;
  logic clk = 1'b0;
  logic r, en, up_fd, dn_fd, up_c, dn_c;
  logic lock, lld;
  int checks = 0, failures = 0;

  lock_detector dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic drive(bit ir, bit ien, bit u, bit d, bit uc, bit dc);
    @(negedge clk);
    r = ir; en = ien; up_fd = u; dn_fd = d; up_c = uc; dn_c = dc;
  endtask

  // Count quiet cycles until LOCK; returns cycles seen.
  task automatic wait_lock(output int n);
    n = 0;
    while (!lock && n < 2000) begin drive(0, 1, 0, 0, 0, 0); #1 n++; end
  endtask

  initial begin
    int n, nlld;
    drive(1, 0, 0, 0, 0, 0); drive(1, 0, 0, 0, 0, 0);

    // not enabled: no lock however quiet
    repeat (600) drive(0, 0, 0, 0, 0, 0);
    #1 check("no lock while disabled", lock, 0);

    // activity every 200 cycles: never locks
    for (int i = 0; i < 2000; i++) drive(0, 1, (i % 200) == 0, (i % 200) == 100, 0, 0);
    #1 check("no lock with activity", lock, 0);

    // coarse pulses before lock: no LLD
    nlld = 0;
    for (int i = 0; i < 100; i++) begin
      drive(0, 1, 1, 0, i[2], i[3]); #1 nlld += lld;
    end
    check("no LLD before lock", nlld, 0);

    // exact lock time
    // n counts the cycle in which LOCK is seen: 256 quiet edges + 1
    wait_lock(n);
    check("quiet cycles to lock", n, 257);
    check("locked", lock, 1);

    // FD activity after lock keeps LOCK
    repeat (50) drive(0, 1, 1, 1, 0, 0);
    #1 check("lock held", lock, 1);

    // UP_C edge -> one LLD cycle
    drive(0, 1, 0, 0, 1, 0);
    nlld = 0;
    repeat (5) begin drive(0, 1, 0, 0, 1, 0); #1 nlld += lld; end
    check("one LLD for UP_C", nlld, 1);
    // LLD is the core's reset: apply it
    drive(1, 1, 0, 0, 0, 0);
    drive(0, 1, 0, 0, 0, 0); #1;
    check("R clears lock", lock, 0);

    // lock again, then DN_C edge
    // one quiet edge already passed in the cycle after R
    wait_lock(n);
    check("relock", n, 256);
    nlld = 0;
    repeat (4) begin drive(0, 1, 0, 0, 0, 1); #1 nlld += lld; end
    check("one LLD for DN_C", nlld, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
