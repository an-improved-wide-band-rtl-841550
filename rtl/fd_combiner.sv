// fd_combiner: merges the coarse (CFD) and fine (FFD) frequency detector
// outputs into the single UP_FD / DN_FD pair that drives the FLL charge
// pump, so that both detectors work at the same time.
//
// STOP is a flip-flop with its data tied high, set by the first UP_C pulse
// (the data is faster than the clock) and cleared only by R. While STOP
// is low (decrement tracking) UP_FD = UP_F and DN_FD = DN_F | DN_C; once
// STOP is high (increment tracking) UP_FD = UP_F | UP_C and DN_FD = DN_F.
// UP_F is the output of the UP pulse selector, not the raw FFD pulse.
//
// The two ORs, two multiplexers and the STOP flip-flop follow the
// document. This design's choice: STOP is set at the clk edge that sees
// UP_C high (synchronous), rather than by UP_C acting as a clock. The
// UP_FD / DN_FD paths are combinational.
module fd_combiner (
  input  logic clk,
  input  logic r,      // R, synchronous, active high
  input  logic up_c,
  input  logic dn_c,
  input  logic up_f,
  input  logic dn_f,
  output logic up_fd,
  output logic dn_fd,
  output logic stop
);
  always_ff @(posedge clk) begin
    if (r)         stop <= 1'b0;
    else if (up_c) stop <= 1'b1;
  end

  assign up_fd = stop ? (up_f | up_c) : up_f;   // MUX1 / OR1
  assign dn_fd = stop ? dn_f : (dn_f | dn_c);   // MUX2 / OR2
endmodule
