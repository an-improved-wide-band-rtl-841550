// sync2: two-flop synchroniser, one per bit.
//
// The frequency detectors are asynchronous mixed-signal circuits; their
// UP/DN pulses are brought into the VCO-clock domain here before any
// counter or state machine looks at them. Output = input delayed by two
// clock edges. The flops are cleared by the synchronous reset r.
module sync2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             r,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (r) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
