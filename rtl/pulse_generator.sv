// pulse_generator: on-chip power-on pulse EN that puts the CDR in its
// initial state.
//
// EN is high while the power-on input por_n is low and stays high for
// EN_CYCLES rising edges of clk after por_n is released, then falls and
// stays low. The rest of the core takes R = EN | LLD as its synchronous
// reset, so EN must span enough clock edges for every block to see it.
// The document only says that a pulse generator produces EN to reset the
// CDR; the counter, the por_n trigger and the 16-cycle width are this
// design's choices.
//
// Timing: por_n is asynchronous (active low); en drops EN_CYCLES clock
// edges after the first edge that sees por_n high.
module pulse_generator #(
  parameter int unsigned EN_CYCLES = 16
) (
  input  logic clk,
  input  logic por_n,
  output logic en
);
  localparam int unsigned CW = $clog2(EN_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      cnt <= '0;
      en  <= 1'b1;
    end else if (en) begin
      if (cnt == CW'(EN_CYCLES - 1)) en <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end
endmodule
