// tb_trac_pkt_rx: self-checking test of the packet buffer/receiver.
//
// The testbench plays the three switches below (requests and bytes on links
// A, B, C in the mapping and interrupting phases) and the processor (SMP,
// SIP, RP).  Checked against a hand-worked script:
//   * an empty buffer takes a first byte only while NEG is high, from the
//     highest-priority requesting link, and then only from that link;
//   * MPA / IPA rise with the first byte; the two buffers fill at once;
//   * after seven bytes no more grants are given;
//   * the processor reads the selected buffer byte by byte (RP ignored in
//     phases 0 and 1), cannot switch to the other buffer before releasing
//     the first, and releases it with a final SMP / SIP;
//   * with the broke bit set a complete packet is dropped without reading.
module tb_trac_pkt_rx;
  import trac_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  phase_t     phase = '0;
  logic       neg = 0;
  logic [2:0] pr = '0, pg;
  byte_t      din [3];
  logic       smp = 0, sip = 0, rp = 0, broken = 0;
  logic       mpa, ipa, rd_ready;
  byte_t      dout;
  int         checks = 0, failures = 0;

  trac_pkt_rx dut (
    .clk, .rst, .phase, .neg, .pr, .pg, .din,
    .smp, .sip, .rp, .broken, .mpa, .ipa, .dout, .rd_ready
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (check %0d)", what, got, exp, checks);
    end
  endtask

  // One TRAC cycle on the switch side.  m_req/i_req: request lines in phase
  // 3 / 4; m_exp/i_exp: the grant that must come back; the bytes m_b/i_b are
  // put on link m_link/i_link in phase 0 / 1.  Processor strobes are given per
  // phase by the arrays.
  task automatic cycle(bit n,
                       logic [2:0] m_req, logic [2:0] m_exp, int m_link, byte_t m_b,
                       logic [2:0] i_req, logic [2:0] i_exp, int i_link, byte_t i_b,
                       logic [5:0] smp_at = '0, logic [5:0] sip_at = '0, logic [5:0] rp_at = '0);
    neg = n;
    for (int p = 0; p < 6; p++) begin
      phase = phase_t'(p);
      din[0] = '0; din[1] = '0; din[2] = '0;
      pr = '0;
      if (p == 0) din[m_link] = m_b;
      if (p == 1) din[i_link] = i_b;
      if (p == 3) pr = m_req;
      if (p == 4) pr = i_req;
      smp = smp_at[p]; sip = sip_at[p]; rp = rp_at[p];
      #1;
      if (p == 3) chk("mapping grant", pg, m_exp);
      else if (p == 4) chk("interrupting grant", pg, i_exp);
      else chk("no grant outside arbitration", pg, 0);
      @(posedge clk); #1;
    end
    smp = 0; sip = 0; rp = 0;
  endtask

  initial begin
    byte_t got [$];
    din[0] = '0; din[1] = '0; din[2] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // not NEG: a first byte is refused
    cycle(0, 3'b001, 3'b000, 0, 8'h00, 3'b000, 3'b000, 0, 8'h00);
    chk("no arrival yet", mpa, 0);
    // NEG: B beats C for mapping, C alone for interrupting
    cycle(1, 3'b110, 3'b010, 0, 8'h00, 3'b100, 3'b100, 0, 8'h00);
    // bytes 0..6 of both packets; grants continue only on the connected link
    for (int i = 0; i < 7; i++) begin
      cycle(0, 3'b011, (i == 6) ? 3'b000 : 3'b010, 1, byte_t'(8'hA0 + i),
               3'b101, (i == 6) ? 3'b000 : 3'b100, 2, byte_t'(8'hC0 + i));
      chk("MPA after first byte", mpa, 1);
      chk("IPA after first byte", ipa, 1);
    end
    // buffers full: no more grants even in NEG
    cycle(1, 3'b111, 3'b000, 0, 8'h00, 3'b111, 3'b000, 0, 8'h00);

    // processor: select mapping, try RP in phases 0/1 (ignored), read all
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000001, 6'b000000, 6'b000000);
    chk("byte ready", rd_ready, 1);
    chk("first mapping byte", dout, 8'hA0);
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000000, 6'b000000, 6'b000011);
    chk("RP in phases 0/1 ignored", dout, 8'hA0);
    for (int i = 0; i < 7; i++) begin
      got.push_back(dout);
      // SIP while the mapping buffer is selected is ignored
      cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000000, 6'b000100, 6'b001000);
    end
    for (int i = 0; i < 7; i++) chk("mapping byte", got[i], 8'hA0 + i);
    chk("all read", rd_ready, 0);
    chk("MPA held until release", mpa, 1);
    // release mapping, then select and read interrupting
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000100, 6'b000000, 6'b000000);
    chk("MPA cleared by final SMP", mpa, 0);
    chk("IPA still set", ipa, 1);
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000000, 6'b000100, 6'b000000);
    got.delete();
    for (int i = 0; i < 7; i++) begin
      got.push_back(dout);
      cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000000, 6'b000000, 6'b100000);
    end
    for (int i = 0; i < 7; i++) chk("interrupting byte", got[i], 8'hC0 + i);
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0, 6'b000000, 6'b000100, 6'b000000);
    chk("IPA cleared by final SIP", ipa, 0);

    // a new mapping packet may now enter, from link A
    cycle(1, 3'b101, 3'b001, 0, 8'h00, 3'b000, 3'b000, 0, 8'h00);

    // broke bit: the packet completes and is dropped without any reading
    broken = 1;
    for (int i = 0; i < 7; i++)
      cycle(0, 3'b001, (i == 6) ? 3'b000 : 3'b001, 0, byte_t'(8'h50 + i),
               3'b000, 3'b000, 0, 8'h00);
    cycle(0, 0, 0, 0, 0, 0, 0, 0, 0);
    chk("broken: packet dropped", mpa, 0);
    cycle(1, 3'b010, 3'b010, 0, 8'h00, 3'b000, 3'b000, 0, 8'h00);
    cycle(0, 3'b010, 3'b010, 1, 8'h60, 3'b000, 3'b000, 0, 8'h00);
    chk("broken: next packet accepted", mpa, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
