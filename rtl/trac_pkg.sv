// trac_pkg: shared constants and types of the TRAC packet network.
//
// The network moves 7-byte packet trains (one direction byte plus six data
// bytes) over 8-bit links, one byte per link per TRAC clock cycle.  Each TRAC
// cycle is divided into clock phases; the packet hardware uses four of them:
//   phase 0  mapping-packet data moves over the link data buses
//   phase 1  interrupting-packet data moves
//   phase 3  mapping-packet request/grant (PR/PG) arbitration
//   phase 4  interrupting-packet request/grant arbitration
// The phase numbers and their use, the 7-byte packet and the 8-cycle
// NEG/DIR/END backplane pattern follow the report; the number of phases per
// cycle (six) is this design's choice, as the report never states it.
package trac_pkg;

  localparam int unsigned BYTE_W      = 8;
  localparam int unsigned PKT_BYTES   = 7;   // direction byte + 6 data bytes
  localparam int unsigned WAVE_PERIOD = 8;   // NEG, DIR, 5 blank, END
  localparam int unsigned PHASE_W     = 3;

  typedef logic [BYTE_W-1:0]  byte_t;
  typedef logic [PHASE_W-1:0] phase_t;

  localparam phase_t PH_MAP_DATA = 3'd0;
  localparam phase_t PH_INT_DATA = 3'd1;
  localparam phase_t PH_MAP_ARB  = 3'd3;
  localparam phase_t PH_INT_ARB  = 3'd4;

  // The two packet channels: mapping (local) and interrupting (global).
  typedef enum logic {CH_MAP = 1'b0, CH_INT = 1'b1} chan_e;

  // Position of a level inside the 8-cycle backplane pattern.
  localparam logic [2:0] WAVE_END = 3'd0;
  localparam logic [2:0] WAVE_NEG = 3'd1;
  localparam logic [2:0] WAVE_DIR = 3'd2;

  // Arbitration phase of a channel and data phase of a channel.
  function automatic phase_t arb_phase(chan_e ch);
    return (ch == CH_MAP) ? PH_MAP_ARB : PH_INT_ARB;
  endfunction

  function automatic phase_t data_phase(chan_e ch);
    return (ch == CH_MAP) ? PH_MAP_DATA : PH_INT_DATA;
  endfunction

endpackage
