// trac_pkt_rx: packet buffer/receiver of a processor module.
//
// Two seven-byte buffers, one for mapping and one for interrupting packets,
// filled from the three switch links below and read by the processor.  To the
// network the receiver behaves as one more switch level:
//   * in the channel's arbitration phase (3 mapping, 4 interrupting) an empty
//     buffer grants the highest-priority requesting link (A over B over C),
//     but only while the receiver level is in NEG, so that the arriving train
//     is aligned with the backplane wave; a partly filled buffer grants the
//     link its packet comes from until all seven bytes are in;
//   * in the data phase (0 mapping, 1 interrupting) the granted byte is
//     written.  MPA (IPA) goes high with the first byte and stays high until
//     the buffer is released.
// The processor reads one buffer at a time.  A pulse on SMP (SIP) selects the
// mapping (interrupting) buffer if none is selected; each RP pulse in a phase
// other than 0 or 1 steps to the next byte; dout always shows the selected
// byte and rd_ready says it has arrived.  After all seven bytes have been read
// a second SMP (SIP) releases the buffer for the next packet.  Reading
// overlaps filling.  With the processor's broke bit set, a completely received
// packet is dropped at once, so that a dead processor never blocks the
// network.
//
// From the report: the interface signals, two buffers, fixed-priority entry
// arbitration, arrival flags on the first byte, reading one buffer at a time,
// the release by a final SMP/SIP and the broke-bit behaviour.  This design's
// choices: A is the highest priority, the NEG condition on the first byte,
// rd_ready, seven stored bytes (the report counts eight transfers per packet,
// the last a dead byte; here the dead byte is the empty slot behind each
// train and is not stored), and a reset that empties both buffers.
module trac_pkt_rx
  import trac_pkg::*;
#(
  parameter int unsigned DEPTH = PKT_BYTES
) (
  input  logic        clk,
  input  logic        rst,
  input  phase_t      phase,
  input  logic        neg,
  // switch side
  input  logic [2:0]  pr,
  output logic [2:0]  pg,
  input  byte_t       din [3],
  // processor side
  input  logic        smp,
  input  logic        sip,
  input  logic        rp,
  input  logic        broken,
  output logic        mpa,
  output logic        ipa,
  output byte_t       dout,
  output logic        rd_ready
);

  localparam int unsigned PW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {SEL_NONE, SEL_MAP, SEL_INT} sel_e;

  byte_t          mem     [2][DEPTH];
  logic [PW-1:0]  cnt     [2];   // bytes received
  logic [PW-1:0]  rd_ptr  [2];   // bytes read
  logic [1:0]     conn_q  [2];
  logic [2:0]     grant_q [2];
  sel_e           sel_q;

  logic [2:0] grant [2];
  logic       rp_ok;
  chan_e      sel_ch;

  function automatic logic [2:0] prio3(logic [2:0] req);
    if (req[0])      return 3'b001;
    else if (req[1]) return 3'b010;
    else if (req[2]) return 3'b100;
    else             return 3'b000;
  endfunction

  function automatic logic [1:0] enc3(logic [2:0] onehot);
    return onehot[2] ? 2'd2 : (onehot[1] ? 2'd1 : 2'd0);
  endfunction

  always_comb begin
    pg = '0;
    for (int c = 0; c < 2; c++) begin
      grant[c] = '0;
      if (phase == arb_phase(chan_e'(c))) begin
        if (cnt[c] == '0 && neg)
          grant[c] = prio3(pr);
        else if (cnt[c] != '0 && cnt[c] < PW'(DEPTH) && pr[conn_q[c]])
          grant[c] = 3'b001 << conn_q[c];
      end
      pg = pg | grant[c];
    end
  end

  assign sel_ch   = (sel_q == SEL_INT) ? CH_INT : CH_MAP;
  assign rd_ready = (sel_q != SEL_NONE) && (rd_ptr[sel_ch] < cnt[sel_ch]);
  assign rp_ok    = rp && rd_ready && phase != PH_MAP_DATA && phase != PH_INT_DATA;
  assign dout     = (sel_q != SEL_NONE && rd_ptr[sel_ch] < PW'(DEPTH))
                    ? mem[sel_ch][rd_ptr[sel_ch][PW-1:0]] : '0;
  assign mpa      = cnt[CH_MAP] != '0;
  assign ipa      = cnt[CH_INT] != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < 2; c++) begin
        cnt[c]     <= '0;
        rd_ptr[c]  <= '0;
        conn_q[c]  <= '0;
        grant_q[c] <= '0;
      end
      sel_q <= SEL_NONE;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (phase == arb_phase(chan_e'(c))) begin
          grant_q[c] <= grant[c];
          if (cnt[c] == '0 && grant[c] != '0) conn_q[c] <= enc3(grant[c]);
        end else if (phase == data_phase(chan_e'(c))) begin
          if (grant_q[c] != '0) begin
            mem[c][cnt[c]] <= din[enc3(grant_q[c])];
            cnt[c]         <= cnt[c] + 1'b1;
          end
          grant_q[c] <= '0;
        end else if (broken && cnt[c] == PW'(DEPTH)) begin
          // dead processor: drop every completed packet
          cnt[c]    <= '0;
          rd_ptr[c] <= '0;
        end
      end

      if (rp_ok) rd_ptr[sel_ch] <= rd_ptr[sel_ch] + 1'b1;

      // select / release
      unique case (sel_q)
        SEL_NONE: if (smp) sel_q <= SEL_MAP; else if (sip) sel_q <= SEL_INT;
        SEL_MAP:  if (smp && cnt[CH_MAP] == PW'(DEPTH) && rd_ptr[CH_MAP] == PW'(DEPTH)) begin
                    cnt[CH_MAP]    <= '0;
                    rd_ptr[CH_MAP] <= '0;
                    sel_q          <= SEL_NONE;
                  end
        SEL_INT:  if (sip && cnt[CH_INT] == PW'(DEPTH) && rd_ptr[CH_INT] == PW'(DEPTH)) begin
                    cnt[CH_INT]    <= '0;
                    rd_ptr[CH_INT] <= '0;
                    sel_q          <= SEL_NONE;
                  end
        default:  sel_q <= SEL_NONE;
      endcase
      if (broken && sel_q != SEL_NONE && cnt[sel_ch] == PW'(DEPTH)
          && phase != data_phase(sel_ch) && phase != arb_phase(sel_ch))
        sel_q <= SEL_NONE;
    end
  end

  a_grant_legal: assert property (@(posedge clk) disable iff (rst)
    $onehot0(pg) && ((pg & ~pr) == 3'b000));

endmodule
