// trac_packet_net: the packet network of a TRAC machine.
//
// Packets are 7-byte trains: a direction byte holding the destination
// processor number, then six data bytes.  A processor writes a packet into
// the packet buffer/transmitter (trac_pkt_tx) of one of its memory modules;
// from there the bytes climb a banyan network of switch nodes
// (trac_pkt_switch), one node per TRAC cycle, to the packet buffer/receiver
// (trac_pkt_rx) of the destination processor.  Mapping (intra-task) and
// interrupting (inter-task) packets use the same wires in different clock
// phases, so they never meet.  The backplane generator (trac_backplane) sends
// a NEG / DIR / END pattern of period 8 up the levels; packet trains ride it,
// which keeps the bytes of a train together and leaves one empty slot between
// trains.  A train blocked at a busy node waits in place for the pattern to
// come round again, 8 cycles later.
//
// Topology (LEVELS routing levels, default 4):
//   level k (k = 0 .. LEVELS-1) has 2**k * 3**(LEVELS-k) switch nodes,
//   numbered  u * 3**(LEVELS-k) + v  with u < 2**k the routing bits already
//   taken and v < 3**(LEVELS-k).  Output d (0 left, 1 right) of node (u, v)
//   feeds input v % 3 of node (2u+d, v / 3) one level up.  Level LEVELS is the
//   2**LEVELS receivers, receiver number = processor number = u.  Level 0 has
//   one node per memory module, fed on input A by that module's transmitter
//   (3**LEVELS memory modules).  Node (u, v) at level k routes by bit
//   LEVELS-1-k of the direction byte, so any memory reaches processor p by
//   the same left/right sequence, the bits of p from the most significant.
// The spread-3 / fan-out-2 banyan, the routing rule and the one-node-per-
// memory lowest level follow the report's routing example; the exact wiring
// permutation and the number of levels (taken from the report's 4-level
// timing example, giving 16 processors and 81 memory modules) are this
// design's choices.
//
// Transmitter glue: the transmitter's MPXM / IPXM drive the shared request
// wire of input A in phase 3 / phase 4 and the grant on that wire is returned
// as GM / GI.
//
// Clocking: clk advances one TRAC clock phase per rising edge; rst is
// synchronous and active high.  Per-memory and per-processor signals are
// arrays indexed by memory-module number and processor number.
module trac_packet_net
  import trac_pkg::*;
#(
  parameter int unsigned LEVELS     = 4,
  parameter int unsigned NUM_PHASES = 6,
  localparam int unsigned N_MEM     = 3 ** LEVELS,
  localparam int unsigned N_PROC    = 2 ** LEVELS
) (
  input  logic   clk,
  input  logic   rst,
  output phase_t phase,
  // memory modules
  input  logic   mem_mpg    [N_MEM],
  input  logic   mem_apg    [N_MEM],
  input  logic   mem_impsel [N_MEM],
  input  logic   mem_pqen   [N_MEM],
  input  logic   mem_load   [N_MEM],
  input  byte_t  mem_din    [N_MEM],
  output byte_t  mem_dout   [N_MEM],
  output logic   mem_mpxm   [N_MEM],
  output logic   mem_ipxm   [N_MEM],
  // processors
  input  logic   proc_smp    [N_PROC],
  input  logic   proc_sip    [N_PROC],
  input  logic   proc_rp     [N_PROC],
  input  logic   proc_broken [N_PROC],
  output logic   proc_mpa    [N_PROC],
  output logic   proc_ipa    [N_PROC],
  output byte_t  proc_dout   [N_PROC],
  output logic   proc_rd_ready [N_PROC]
);

  function automatic int unsigned nodes(int unsigned k);
    return (2 ** k) * (3 ** (LEVELS - k));
  endfunction

  logic            cycle_end;
  logic [LEVELS:0] bp_neg, bp_dir, bp_end;

  trac_phase_gen #(.NUM_PHASES(NUM_PHASES)) u_phase (
    .clk, .rst, .phase, .cycle_end
  );

  trac_backplane #(.LEVELS(LEVELS)) u_bp (
    .clk, .rst, .cycle_end, .neg(bp_neg), .dir(bp_dir), .end_s(bp_end)
  );

  // Each level keeps its own link signals: up_pr / up_data for its upper
  // links (read by the level above) and dn_pg for the grants it returns on
  // its lower links (read by the level below).
  for (genvar k = 0; k < LEVELS; k++) begin : g_lvl
    localparam int unsigned NK = nodes(k);
    localparam int unsigned VK = 3 ** (LEVELS - k);      // v range at level k
    localparam int unsigned VB = 3 ** (LEVELS - k + 1);  // v range one level down

    logic  up_pr   [NK][2];
    byte_t up_data [NK][2];
    logic  dn_pg   [NK][3];

    for (genvar j = 0; j < NK; j++) begin : g_node
      localparam int unsigned U = j / VK;
      localparam int unsigned V = j % VK;
      logic [2:0] pr_dn, pg_dn;
      byte_t      din [3];
      logic [1:0] pr_up, pg_up;
      byte_t      dout [2];

      if (k == 0) begin : g_src
        // lowest level: one node per memory module, its transmitter on input A
        byte_t tx_data;
        logic  tx_gm, tx_gi;

        trac_pkt_tx u_tx (
          .clk, .rst, .phase,
          .mpg(mem_mpg[j]), .apg(mem_apg[j]), .impsel(mem_impsel[j]),
          .pqen(mem_pqen[j]), .load(mem_load[j]), .din(mem_din[j]),
          .qout(mem_dout[j]),
          .mpxm(mem_mpxm[j]), .ipxm(mem_ipxm[j]), .gm(tx_gm), .gi(tx_gi),
          .sw_data(tx_data)
        );

        assign pr_dn  = {2'b00, (phase == PH_MAP_ARB && mem_mpxm[j]) ||
                                (phase == PH_INT_ARB && mem_ipxm[j])};
        assign tx_gm  = (phase == PH_MAP_ARB) && pg_dn[0];
        assign tx_gi  = (phase == PH_INT_ARB) && pg_dn[0];
        assign din[0] = tx_data;
        assign din[1] = '0;
        assign din[2] = '0;
      end else begin : g_src
        for (genvar p = 0; p < 3; p++) begin : g_in
          localparam int unsigned SRC = (U / 2) * VB + V * 3 + p;
          assign pr_dn[p] = g_lvl[k-1].up_pr[SRC][U % 2];
          assign din[p]   = g_lvl[k-1].up_data[SRC][U % 2];
        end
      end

      for (genvar p = 0; p < 3; p++) begin : g_pg
        assign dn_pg[j][p] = pg_dn[p];
      end

      trac_pkt_switch #(.LEVELS(LEVELS), .LEVEL(k)) u_sw (
        .clk, .rst, .phase,
        .neg(bp_neg[k]), .dir(bp_dir[k]), .end_s(bp_end[k]),
        .pr_dn, .pg_dn, .din, .pr_up, .pg_up, .dout
      );

      for (genvar d = 0; d < 2; d++) begin : g_up
        localparam int unsigned DST  = (2 * U + d) * (VK / 3) + V / 3;
        localparam int unsigned PORT = V % 3;
        assign up_pr[j][d]   = pr_up[d];
        assign up_data[j][d] = dout[d];
        if (k == LEVELS - 1) begin : g_top
          assign pg_up[d] = g_proc[DST].pg[PORT];
        end else begin : g_mid
          assign pg_up[d] = g_lvl[k+1].dn_pg[DST][PORT];
        end
      end
    end
  end

  // -------------------------------------------------------------- receivers
  for (genvar q = 0; q < N_PROC; q++) begin : g_proc
    logic [2:0] pr, pg;
    byte_t      din [3];

    for (genvar p = 0; p < 3; p++) begin : g_in
      localparam int unsigned SRC = (q / 2) * 3 + p;
      assign pr[p]  = g_lvl[LEVELS-1].up_pr[SRC][q % 2];
      assign din[p] = g_lvl[LEVELS-1].up_data[SRC][q % 2];
    end

    trac_pkt_rx u_rx (
      .clk, .rst, .phase, .neg(bp_neg[LEVELS]),
      .pr, .pg, .din,
      .smp(proc_smp[q]), .sip(proc_sip[q]), .rp(proc_rp[q]),
      .broken(proc_broken[q]),
      .mpa(proc_mpa[q]), .ipa(proc_ipa[q]),
      .dout(proc_dout[q]), .rd_ready(proc_rd_ready[q])
    );
  end

endmodule
