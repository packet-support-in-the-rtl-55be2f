// trac_phase_gen: TRAC clock phase sequencer.
//
// The design runs on one clock whose every rising edge ends one phase of the
// TRAC machine cycle.  This counter numbers the phases 0 .. NUM_PHASES-1 and
// flags the last one, at whose end a new TRAC cycle begins (the backplane
// pattern then shifts).  The report names the phases and what happens in
// phases 0, 1, 3 and 4; the count of six phases per cycle and the synchronous
// active-high reset (to phase 0) are this design's choices.
//
// Interface: phase is valid throughout the clock period it labels;
// cycle_end is high during the last phase.
module trac_phase_gen
  import trac_pkg::*;
#(
  parameter int unsigned NUM_PHASES = 6
) (
  input  logic   clk,
  input  logic   rst,
  output phase_t phase,
  output logic   cycle_end
);

  initial assert (NUM_PHASES >= 5 && NUM_PHASES <= 8)
    else $error("trac_phase_gen: phases 0..4 are used, NUM_PHASES must be 5..8");

  always_ff @(posedge clk) begin
    if (rst)            phase <= '0;
    else if (cycle_end) phase <= '0;
    else                phase <= phase + 1'b1;
  end

  assign cycle_end = (phase == phase_t'(NUM_PHASES - 1));

endmodule
