// lock_detector: frequency lock detector (LD) and loss-of-lock detector
// (LoLD) of the frequency-locked loop.
//
// LD: once enabled (band selection finished), it counts consecutive clk
// cycles in which neither UP_FD nor DN_FD is active. A frequency detector
// that issues one correction per beat period goes quiet for a whole
// window only when the beat period exceeds LD_WIN clock periods, i.e. when
// the relative frequency error is below about 1/LD_WIN. LOCK then rises
// and stays high until R; it hands the loop from the frequency detector
// to the phase detector.
// LoLD: while LOCK is high, any rising edge of the coarse detector's
// UP_C or DN_C (which only fire on a large frequency error, i.e. a change
// of the input data rate) gives a one-cycle LLD pulse; the core ORs LLD
// into its reset R and acquisition starts over.
//
// The document states what the LD and LoLD do, not how; the quiet-window
// rule and LD_WIN = 256 are this design's choices. All inputs must be
// synchronous to clk. Timing: LOCK rises on the LD_WIN-th consecutive
// quiet cycle; LLD is registered, one cycle after the coarse edge.
module lock_detector #(
  parameter int unsigned LD_WIN = 256
) (
  input  logic clk,
  input  logic r,        // R, synchronous, active high
  input  logic en,       // start looking for lock
  input  logic up_fd,
  input  logic dn_fd,
  input  logic up_c,
  input  logic dn_c,
  output logic lock,
  output logic lld
);
  localparam int unsigned QW = $clog2(LD_WIN + 1);

  logic [QW-1:0] quiet;
  logic          up_c_q, dn_c_q;
  logic          coarse_rise;

  assign coarse_rise = (up_c & ~up_c_q) | (dn_c & ~dn_c_q);

  always_ff @(posedge clk) begin
    if (r) begin
      quiet  <= '0;
      lock   <= 1'b0;
      lld    <= 1'b0;
      up_c_q <= 1'b0;
      dn_c_q <= 1'b0;
    end else begin
      up_c_q <= up_c;
      dn_c_q <= dn_c;
      lld    <= lock & coarse_rise;
      if (!lock) begin
        if (!en || up_fd || dn_fd) begin
          quiet <= '0;
        end else if (quiet == QW'(LD_WIN - 1)) begin
          lock  <= 1'b1;
        end else begin
          quiet <= quiet + 1'b1;
        end
      end
    end
  end
endmodule
