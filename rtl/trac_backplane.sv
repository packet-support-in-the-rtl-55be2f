// trac_backplane: NEG / DIR / END synchronisation signals of the switch levels.
//
// Every switch level sees the same 8-cycle pattern - one cycle NEG, one DIR,
// five blank, one END - and each level runs one cycle behind the level below
// it, so the pattern climbs the network one level per TRAC cycle (at cycle 0
// level 0 is in END, level 1 in END one cycle later, and so on).  A packet
// train moving without blockage rides this wave: its direction byte sits in
// a DIR node, its last byte in an END node, and a NEG node is the empty slot
// ahead of it that can take a new direction byte.
//
// Implementation: a modulo-8 cycle counter; level L is at position
// (count - L) mod 8 of the pattern, 0 = END, 1 = NEG, 2 = DIR.  Outputs are
// indexed by level; index LEVELS is the level of the packet receivers, which
// behave as one more switch level.  The pattern and its climb follow the
// report's backplane timing table; the reset state (count 0, level 0 in END)
// matches the table's cycle 0.
//
// Timing: the outputs change at the clock edge that ends the last phase of a
// TRAC cycle (cycle_end high) and are stable for the whole next cycle.
module trac_backplane
  import trac_pkg::*;
#(
  parameter int unsigned LEVELS = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cycle_end,
  output logic [LEVELS:0] neg,
  output logic [LEVELS:0] dir,
  output logic [LEVELS:0] end_s
);

  logic [2:0] count;

  always_ff @(posedge clk) begin
    if (rst)            count <= '0;
    else if (cycle_end) count <= count + 3'd1;
  end

  always_comb begin
    for (int unsigned l = 0; l <= LEVELS; l++) begin
      logic [2:0] pos;
      pos      = count - 3'(l);
      neg[l]   = (pos == WAVE_NEG);
      dir[l]   = (pos == WAVE_DIR);
      end_s[l] = (pos == WAVE_END);
    end
  end

endmodule
