// trac_pkt_tx: packet buffer/transmitter of a memory module.
//
// A seven-byte FIFO between the sending processor and the packet network.
// The processor writes one packet byte per TRAC cycle: with LOAD high the byte
// on din is written at the end of phase 4.  As soon as the FIFO holds a byte
// the transmitter requests the switch above it - MPXM for a mapping packet,
// IPXM for an interrupting one - and keeps requesting while it holds bytes.
// A grant (GM, or GI) seen at the end of the channel's arbitration phase
// (3, or 4) sends the head byte onto sw_data in the next data phase (0, or
// 1) and removes it.  Filling and emptying thus overlap: with no blocking the
// buffer empties as fast as it is filled.  Packet boundaries need no
// counting here: the switch above only takes a direction byte when its level
// is in NEG, so successive packets leave with one empty cycle between them.
//
// The module is a mapping source when MPG is set and an interrupting source
// when APG is set; IMPSEL picks the type of the packet being loaded (1 =
// mapping, 0 = interrupting) and a load is taken only when the matching
// generator flag is set.  The type is fixed by the first byte loaded into an
// empty buffer.  With PQEN high, qout bit 7 reads 1 while the buffer holds any
// byte, so the processor can wait for an empty buffer.
//
// From the report: the signal set, the FIFO of one packet, loading at the end
// of phase 4, the request held until granted, the query bit.  This design's
// choices: grants are taken in the arbitration phase of the switch network
// (the report has the request start in phase 0); loads into a full buffer or
// of the wrong type are ignored; qout is zero when PQEN is low.
module trac_pkt_tx
  import trac_pkg::*;
#(
  parameter int unsigned DEPTH = PKT_BYTES
) (
  input  logic   clk,
  input  logic   rst,
  input  phase_t phase,
  // memory module side
  input  logic   mpg,
  input  logic   apg,
  input  logic   impsel,
  input  logic   pqen,
  input  logic   load,
  input  byte_t  din,
  output byte_t  qout,
  // switch side
  output logic   mpxm,
  output logic   ipxm,
  input  logic   gm,
  input  logic   gi,
  output byte_t  sw_data
);

  localparam int unsigned PW = $clog2(DEPTH);

  byte_t          fifo [DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [PW:0]    count;
  logic           is_map_q;   // type of the packet in the buffer
  logic           send_q;     // head byte leaves in the next data phase

  logic  type_ok, do_load, do_send;
  phase_t my_data_phase;

  assign type_ok = impsel ? mpg : apg;
  assign do_load = load && (phase == PH_INT_ARB) && type_ok && (count < (PW+1)'(DEPTH))
                   && (count == '0 || impsel == is_map_q);
  assign my_data_phase = is_map_q ? PH_MAP_DATA : PH_INT_DATA;
  assign do_send = send_q && (phase == my_data_phase);

  assign mpxm = (count != '0) &&  is_map_q;
  assign ipxm = (count != '0) && !is_map_q;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      is_map_q <= 1'b1;
      send_q   <= 1'b0;
    end else begin
      if (do_load) begin
        fifo[wr_ptr] <= din;
        wr_ptr       <= inc(wr_ptr);
        if (count == '0) is_map_q <= impsel;
      end
      if (do_send) begin
        rd_ptr <= inc(rd_ptr);
        send_q <= 1'b0;
      end else if (phase == PH_MAP_ARB && is_map_q) begin
        send_q <= gm && mpxm;
      end else if (phase == PH_INT_ARB && !is_map_q) begin
        send_q <= gi && ipxm;
      end
      count <= count + (PW+1)'(do_load) - (PW+1)'(do_send);
    end
  end

  assign sw_data = do_send ? fifo[rd_ptr] : '0;
  assign qout    = pqen ? {count != '0, 7'b0} : '0;

  // A grant is only meaningful while the matching request is raised.
  a_grant_needs_request: assert property (@(posedge clk) disable iff (rst)
    (phase == PH_MAP_ARB && gm) |-> mpxm);

endmodule
