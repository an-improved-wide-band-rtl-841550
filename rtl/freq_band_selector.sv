// freq_band_selector: logic of the frequency band selector (FBS) that
// picks one of the three VCO bands before the frequency-locked loop runs.
//
// Algorithm (the document's): force VC to VC3min with D1 = 1, so the VCO
// sits at the bottom of band 3, and watch the coarse detector. An UP_C
// pulse means the half-rate data is faster still: band 3 is chosen.
// Otherwise force VC to VC1max with D1 = 0 (top of band 1) and watch
// again: UP_C now selects band 2 (D0 = 1), its absence band 1. Then the VC
// override is released and the loop starts from the last forced voltage.
//
// A check answers "no UP_C" once DN_WIN rising edges of DN_C have been
// seen without UP_C; the document says DN_C creates the timing window for
// checking UP_C, but not how many pulses. The count (4), a TIMEOUT for a
// rate inside the detector's dead zone where neither pulse comes, and the
// SETTLE cycles ignored after each change of the forced voltage are this
// design's choices. The bandgap references themselves are analog; vc_force
// only says which one to apply.
//
// Interface: UP_C and DN_C must be synchronous to clk. {D1, D0} follow
// cdr_pkg::band_e. done rises when the band is fixed and stays high until
// R. Timing: a check lasts at least SETTLE + 1 and at most
// SETTLE + TIMEOUT clk cycles.
module freq_band_selector
  import cdr_pkg::*;
#(
  parameter int unsigned SETTLE  = 16,
  parameter int unsigned DN_WIN  = 4,
  parameter int unsigned TIMEOUT = 1024
) (
  input  logic      clk,
  input  logic      r,        // RESET (R), synchronous, active high
  input  logic      up_c,
  input  logic      dn_c,
  output vc_force_e vc_force,
  output logic      d0,
  output logic      d1,
  output logic      done
);
  localparam int unsigned TW = $clog2(SETTLE + TIMEOUT + 1);
  localparam int unsigned NW = $clog2(DN_WIN + 1);

  fbs_state_e    state;
  band_e         band_q;
  logic [TW-1:0] cyc;
  logic [NW-1:0] n_dn;
  logic          dn_c_q;
  logic          armed;     // settling time over
  logic          saw_up;
  logic          saw_none;

  assign armed    = (cyc >= TW'(SETTLE));
  assign saw_up   = armed & up_c;
  assign saw_none = armed & ~up_c &
                    (((n_dn == NW'(DN_WIN - 1)) & dn_c & ~dn_c_q) |
                     (cyc == TW'(SETTLE + TIMEOUT)));

  always_ff @(posedge clk) begin
    if (r) begin
      state  <= FBS_CHECK3;
      band_q <= BAND3;
      cyc    <= '0;
      n_dn   <= '0;
      dn_c_q <= 1'b0;
    end else begin
      dn_c_q <= dn_c;
      if (state != FBS_DONE) begin
        cyc <= cyc + 1'b1;
        if (armed && dn_c && !dn_c_q) n_dn <= n_dn + 1'b1;
        if (saw_up || saw_none) begin
          cyc  <= '0;
          n_dn <= '0;
        end
        unique case (state)
          FBS_CHECK3: begin
            if (saw_up) begin
              state <= FBS_DONE;       // band 3, keep D1 = 1
            end else if (saw_none) begin
              state  <= FBS_CHECK1;
              band_q <= BAND1;         // D1 = 0, VC = VC1max
            end
          end
          FBS_CHECK1: begin
            if (saw_up) begin
              state  <= FBS_DONE;
              band_q <= BAND2;         // D0 = 1
            end else if (saw_none) begin
              state  <= FBS_DONE;      // band 1
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (state)
      FBS_CHECK3: vc_force = VC_3MIN;
      FBS_CHECK1: vc_force = VC_1MAX;
      default:    vc_force = VC_LOOP;
    endcase
  end

  assign {d1, d0} = band_q;
  assign done     = (state == FBS_DONE);

endmodule
