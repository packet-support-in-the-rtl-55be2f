// trac_pkt_switch: packet switching circuit of one TRAC switch node.
//
// A node has three links below it (inputs A, B, C, from memory side) and two
// above it (outputs 1 = left, 2 = right, towards the processors).  For each of
// the two packet channels - mapping and interrupting - it holds one byte of a
// packet train.  Trains move one node per TRAC cycle:
//   * arbitration phase (3 for mapping, 4 for interrupting): every node that
//     holds a byte raises PR on the upper link its train is routed to.  A
//     node grants (PG) one lower link when
//       - it is empty and its level is in NEG: the byte is a direction byte;
//         the highest-priority requesting link wins (A over B over C) and the
//         node remembers that link as its connection, or
//       - it holds a byte, is not in END, and itself received PG from above:
//         the byte behind it in the same train (on the remembered link) may
//         follow.  A node in END holds the last byte of a train and grants
//         nothing, which leaves an empty slot between trains.
//     Grants thus start at the head of a train and ripple down it
//     combinationally within the phase; a blocked head blocks the whole train.
//   * data phase (0 mapping, 1 interrupting): a node that received PG drives
//     its byte onto the chosen upper link; a node that gave PG loads the byte
//     from the granted lower link.
// A byte that enters a node while its level is in DIR is a direction byte
// (trains only move in step with the backplane pattern, so a direction byte
// always arrives in DIR and no other byte does).  The node routes the train by
// bit (LEVELS-1-LEVEL) of it: 0 = left, 1 = right, so the first routing level
// uses the most significant processor-number bit; the choice is kept for the
// rest of the train.  The choice is latched on entry rather than re-read while
// in DIR because a stalled train falls out of step with the pattern and its
// body bytes then sit in DIR nodes.
//
// From the report: the three inputs with fixed priority, the one-byte buffer
// per channel, the NEG/DIR/END grant rules, the shared PR/PG wires used in
// phase 3 for mapping and phase 4 for interrupting packets, and one hop per
// cycle.  This design's choices: A has the highest priority, the processor-bit
// order above, one byte register per channel driving either upper link (the
// original latches the byte into a left and a right register and enables
// one), and the grant/move decisions being registered at the end of the
// arbitration phase for use in the next data phase.
//
// Interface: pr_dn/pg_dn/din index 0..2 = links A..C; pr_up/pg_up/dout index
// 0 = left, 1 = right.  dout is zero when not driven.  pg_dn depends
// combinationally on pg_up in the arbitration phases.
module trac_pkt_switch
  import trac_pkg::*;
#(
  parameter int unsigned LEVELS = 4,
  parameter int unsigned LEVEL  = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  phase_t      phase,
  input  logic        neg,
  input  logic        dir,
  input  logic        end_s,
  input  logic [2:0]  pr_dn,
  output logic [2:0]  pg_dn,
  input  byte_t       din   [3],
  output logic [1:0]  pr_up,
  input  logic [1:0]  pg_up,
  output byte_t       dout  [2]
);

  localparam int unsigned RBIT = LEVELS - 1 - LEVEL;

  initial assert (LEVEL < LEVELS && LEVELS <= BYTE_W)
    else $error("trac_pkt_switch: LEVEL must be below LEVELS, LEVELS at most 8");

  // Per-channel state, index = chan_e.
  byte_t      buf_q   [2];
  logic       full_q  [2];
  logic [1:0] conn_q  [2];  // lower link the current train comes from
  logic       route_q [2];  // 0 = left, 1 = right
  logic [2:0] grant_q [2];  // link granted in the last arbitration phase
  logic       move_q  [2];  // byte leaves in the next data phase

  logic       arb_now [2];
  logic       got_pg  [2];
  logic [2:0] grant   [2];

  function automatic logic [2:0] prio3(logic [2:0] req);
    if (req[0])      return 3'b001;
    else if (req[1]) return 3'b010;
    else if (req[2]) return 3'b100;
    else             return 3'b000;
  endfunction

  function automatic logic [1:0] enc3(logic [2:0] onehot);
    return onehot[2] ? 2'd2 : (onehot[1] ? 2'd1 : 2'd0);
  endfunction

  // Requests depend only on the node's own state; kept apart from the grant
  // logic so that the request (upward) and grant (downward) paths stay
  // visibly separate.
  always_comb begin
    pr_up = '0;
    for (int c = 0; c < 2; c++) begin
      arb_now[c] = (phase == arb_phase(chan_e'(c)));
      if (arb_now[c] && full_q[c]) pr_up[route_q[c]] = 1'b1;
    end
  end

  always_comb begin
    pg_dn = '0;
    for (int c = 0; c < 2; c++) begin
      got_pg[c] = arb_now[c] && full_q[c] && pg_up[route_q[c]];
      grant[c]  = '0;
      if (arb_now[c]) begin
        if (!full_q[c] && neg)
          grant[c] = prio3(pr_dn);
        else if (full_q[c] && !end_s && got_pg[c] && pr_dn[conn_q[c]])
          grant[c] = 3'b001 << conn_q[c];
      end
      pg_dn = pg_dn | grant[c];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 2; c++) begin
        buf_q[c]   <= '0;
        full_q[c]  <= 1'b0;
        conn_q[c]  <= '0;
        route_q[c] <= 1'b0;
        grant_q[c] <= '0;
        move_q[c]  <= 1'b0;
      end
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (arb_now[c]) begin
          grant_q[c] <= grant[c];
          move_q[c]  <= got_pg[c];
          if (!full_q[c] && grant[c] != '0) conn_q[c] <= enc3(grant[c]);
        end else if (phase == data_phase(chan_e'(c))) begin
          if (grant_q[c] != '0) begin
            buf_q[c]  <= din[enc3(grant_q[c])];
            full_q[c] <= 1'b1;
            // only a direction byte enters a node while its level is in DIR
            if (dir) route_q[c] <= din[enc3(grant_q[c])][RBIT];
          end else if (move_q[c]) begin
            full_q[c] <= 1'b0;
          end
          grant_q[c] <= '0;
          move_q[c]  <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    dout[0] = '0;
    dout[1] = '0;
    for (int c = 0; c < 2; c++)
      if (phase == data_phase(chan_e'(c)) && move_q[c])
        dout[route_q[c]] = buf_q[c];
  end

  // A grant goes to at most one link, and only to a link that requests.
  a_grant_legal: assert property (@(posedge clk) disable iff (rst)
    $onehot0(pg_dn) && ((pg_dn & ~pr_dn) == 3'b000));
  // A node never grants a new byte while its own byte cannot leave.
  a_no_overwrite: assert property (@(posedge clk) disable iff (rst)
    (arb_now[0] && full_q[0] && grant[0] != '0) |-> got_pg[0]);

endmodule
