// tb_freq_band_selector: checks the band selection sequence.
//
// Each scenario resets the selector, then plays coarse-detector pulses:
//   band 3: UP_C during the VC3min check;
//   band 2: four DN_C (no UP) at VC3min, then UP_C at VC1max;
//   band 1: four DN_C at VC3min, four DN_C at VC1max;
//   three DN_C then UP_C at VC3min: the window is still open, band 3;
//   UP_C inside the 16 settling cycles is ignored;
//   no pulses at all: each check ends after 16 + 1024 cycles, band 1.
// During each check the forced voltage and band bits are compared with
// the sequence (VC3min with D1 = 1, then VC1max with D1 = D0 = 0); after
// the decision VC must be released, done high and {D1, D0} hold the band
// while further random pulses arrive.
module tb_freq_band_selector;
  import cdr_pkg::*;
  logic clk = 1'b0;
  logic r, up_c, dn_c;
  vc_force_e vc_force;
  logic d0, d1, done;
  int checks = 0, failures = 0;

  freq_band_selector dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic step(bit u, bit d);
    @(negedge clk); up_c = u; dn_c = d;
  endtask

  task automatic reset();
    @(negedge clk); r = 1; up_c = 0; dn_c = 0;
    repeat (2) @(negedge clk);
    r = 0;
    #1;
    check("start: VC3min", vc_force, VC_3MIN);
    check("start: D1", d1, 1);
    check("start: D0", d0, 0);
    check("start: not done", done, 0);
  endtask

  task automatic idle(int n);
    repeat (n) step(0, 0);
  endtask

  task automatic dn_pulses(int n);
    repeat (n) begin step(0, 1); step(0, 1); step(0, 0); step(0, 0); end
  endtask

  task automatic expect_band(band_e b, string what);
    idle(2);
    #1;
    check({what, ": done"}, done, 1);
    check({what, ": VC released"}, vc_force, VC_LOOP);
    check({what, ": band"}, {d1, d0}, b);
    // decision holds whatever the detector does afterwards
    repeat (300) step(($urandom % 7) == 0, ($urandom % 5) == 0);
    #1;
    check({what, ": band held"}, {d1, d0}, b);
    check({what, ": still done"}, done, 1);
  endtask

  initial begin
    int t;
    r = 1; up_c = 0; dn_c = 0;

    // band 3
    reset();
    idle(20);
    step(1, 0); step(1, 0); step(0, 0);
    expect_band(BAND3, "band3");

    // band 2
    reset();
    idle(20);
    dn_pulses(4);
    idle(1); #1;
    check("band2: VC1max", vc_force, VC_1MAX);
    check("band2: D1 low during check", d1, 0);
    check("band2: D0 low during check", d0, 0);
    idle(20);
    step(1, 0); step(0, 0);
    expect_band(BAND2, "band2");

    // band 1
    reset();
    idle(20);
    dn_pulses(4);
    idle(20);
    dn_pulses(4);
    expect_band(BAND1, "band1");

    // three DN_C then UP_C: still band 3
    reset();
    idle(20);
    dn_pulses(3);
    #1 check("3 DN_C: still VC3min", vc_force, VC_3MIN);
    step(1, 0); step(0, 0);
    expect_band(BAND3, "3dn+up");

    // UP_C while settling is ignored, then DN_C decide
    reset();
    step(1, 0); step(1, 0); step(0, 0);
    idle(5); #1;
    check("settle: no decision", done, 0);
    check("settle: still VC3min", vc_force, VC_3MIN);
    idle(20);
    dn_pulses(4);
    idle(20);
    dn_pulses(4);
    expect_band(BAND1, "settle");

    // timeout path: exact length of the first check
    reset();
    t = 0;
    while (vc_force == VC_3MIN && t < 5000) begin step(0, 0); #1; t++; end
    check("timeout length", t, 16 + 1024 + 1);
    t = 0;
    while (!done && t < 5000) begin step(0, 0); #1; t++; end
    check("timeout length 2", t, 16 + 1024 + 1);
    expect_band(BAND1, "timeout");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
