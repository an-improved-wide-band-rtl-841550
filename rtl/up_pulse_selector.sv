// up_pulse_selector: decides whether the fine frequency detector's UP
// pulse reaches the coarse/fine combiner widened or as it is.
//
// At high data rates the fine detector's UP pulses (UP_F1) are narrow, so
// frequency-increment tracking is slow. A divide-by-2 clocked by UP_F1
// gives UP_F2, which stays high from one UP_F1 pulse to the next and so
// roughly doubles the charge delivered per beat. Widening is only safe
// while the frequency error is large, so the block measures the error:
// it counts UP_F1 pulses (N_UP) in a window of 16 ticks of CLK/8, i.e.
// 128 T_CK. Whenever N_UP reaches the band's threshold (20 in band 2,
// D0 = 1; 8 in band 3, D1 = 1) the reset RS clears both counters and a new
// window starts, UP_F2 staying selected. When a window runs out first,
// the window counter's bit B4 (SL1) rises, freezes both counters through
// E = STOP & ~SL1, and raises SL_UP = (D0 | D1) & SL1, after which the raw
// UP_F1 is passed. Counting only runs in frequency-increment mode
// (STOP = 1). In band 1 the pulse is never widened.
//
// Structure (divider, two 5-bit counters, E and RS gating, threshold
// ANDs on counter bits) follows the document's gate-level drawing. This
// design's choices: everything is synchronous to clk (UP_F1 must already
// be in the clk domain, one count per rising edge of UP_F1); the
// threshold ANDs are written as "all bits of the threshold constant are
// set", which equals the drawn AND gates for 20 (B4, B2) and 8 (B3); the
// pulse counter saturates; the divide-by-2 is reset by R; band 1 passes
// UP_F1 (the drawing would pass UP_F2 there, the text says band 1 is not
// widened).
//
// Timing: RS is combinational and clears the counters at the next clk
// edge. UP_F2 toggles one clk cycle after each UP_F1 rising edge. The
// divide-by-8 is cleared only by R, so a window restarted by RS lasts
// 121 to 128 T_CK; the first window after R lasts exactly 128.
module up_pulse_selector #(
  parameter int unsigned DIV_CK   = 8,   // clock divider ahead of the window counter
  parameter int unsigned CNT_W    = 5,   // width of both counters
  parameter int unsigned WIN_BIT  = 4,   // window counter bit that ends the window (SL1)
  parameter int unsigned TH_BAND2 = 20,  // N_UP threshold in band 2
  parameter int unsigned TH_BAND3 = 8    // N_UP threshold in band 3
) (
  input  logic             clk,
  input  logic             r,       // R, synchronous, active high
  input  logic             stop,    // STOP: frequency-increment mode
  input  logic             d0,      // band bits
  input  logic             d1,
  input  logic             up_f1,   // UP pulse of the fine FD
  output logic             up_f,    // selected UP pulse
  output logic             up_f2,   // divide-by-2 of UP_F1
  output logic             sl_up,   // window ended below threshold
  output logic             rs,      // counter reset
  output logic [CNT_W-1:0] n_up     // UP_F1 count in the current window
);
  localparam int unsigned DW = (DIV_CK > 1) ? $clog2(DIV_CK) : 1;
  localparam logic [CNT_W-1:0] TH2 = CNT_W'(TH_BAND2);
  localparam logic [CNT_W-1:0] TH3 = CNT_W'(TH_BAND3);

  logic [DW-1:0]    div_cnt;
  logic             div_tick;     // one clk cycle per DIV_CK: rising edge of CLK/8
  logic [CNT_W-1:0] win_cnt;
  logic             sl1;
  logic             e;
  logic             up_f1_q;
  logic             up_rise;
  logic             hit2, hit3;

  // Divide-by-8 of CLK.
  always_ff @(posedge clk) begin
    if (r) div_cnt <= '0;
    else   div_cnt <= (div_cnt == DW'(DIV_CK - 1)) ? '0 : div_cnt + 1'b1;
  end
  assign div_tick = (div_cnt == DW'(DIV_CK - 1));

  assign sl1 = win_cnt[WIN_BIT];
  assign e   = stop & ~sl1;

  // Threshold gates: AND of the counter bits that are 1 in the threshold.
  assign hit2 = ((n_up & TH2) == TH2);
  assign hit3 = ((n_up & TH3) == TH3);
  assign rs   = r | (d1 & hit3) | (d0 & hit2);

  // Window counter: counts CLK/8 while enabled, cleared by RS.
  always_ff @(posedge clk) begin
    if (rs)                 win_cnt <= '0;
    else if (e && div_tick) win_cnt <= win_cnt + 1'b1;
  end

  // UP_F1 edge detector and pulse counter.
  always_ff @(posedge clk) begin
    if (r) up_f1_q <= 1'b0;
    else   up_f1_q <= up_f1;
  end
  assign up_rise = up_f1 & ~up_f1_q;

  always_ff @(posedge clk) begin
    if (rs)                                   n_up <= '0;
    else if (e && up_rise && (n_up != '1))    n_up <= n_up + 1'b1;
  end

  // Divide-by-2 clocked by UP_F1.
  always_ff @(posedge clk) begin
    if (r)            up_f2 <= 1'b0;
    else if (up_rise) up_f2 <= ~up_f2;
  end

  // Output selection.
  assign sl_up = (d0 | d1) & sl1;
  assign up_f  = (sl_up | ~(d0 | d1)) ? up_f1 : up_f2;

endmodule
