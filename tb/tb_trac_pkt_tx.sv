// tb_trac_pkt_tx: self-checking test of the packet buffer/transmitter.
//
// Drives whole TRAC cycles: LOAD is held for the cycle (the byte must be taken
// at the end of phase 4 only), GM is offered in phase 3 and GI in phase 4.
// A reference FIFO in the testbench predicts every byte that must appear on
// sw_data in the next data phase (phase 0 for mapping, 1 for interrupting).
// Covered: overlapped loading and sending, a withheld grant holding the
// request, a load into a full buffer being ignored, the PQEN query bit, a
// load refused when the matching generator flag is off, and an interrupting
// packet using IPXM, GI and phase 1.
module tb_trac_pkt_tx;
  import trac_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  phase_t phase = '0;
  logic   mpg = 0, apg = 0, impsel = 1, pqen = 0, load = 0;
  byte_t  din = '0, qout, sw_data;
  logic   mpxm, ipxm, gm = 0, gi = 0;
  int     checks = 0, failures = 0;

  byte_t  ref_q [$];
  bit     exp_send;     // a byte must appear in the next data phase

  trac_pkt_tx dut (
    .clk, .rst, .phase, .mpg, .apg, .impsel, .pqen, .load, .din, .qout,
    .mpxm, .ipxm, .gm, .gi, .sw_data
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One TRAC cycle.  is_map: type of the packet being sent (selects phases).
  // do_load/b: byte offered this cycle; grant: grant offered this cycle;
  // accept: whether the load must be taken.
  task automatic cycle(bit is_map, bit do_load, byte_t b, bit grant, bit accept);
    for (int p = 0; p < 6; p++) begin
      phase = phase_t'(p);
      load  = do_load;
      din   = b;
      gm    = (p == 3) && grant && mpxm;
      gi    = (p == 4) && grant && ipxm;
      #1;
      if (p == (is_map ? 0 : 1)) begin
        if (exp_send) begin
          chk("byte sent in data phase", sw_data, ref_q.pop_front());
          exp_send = 0;
        end else chk("bus idle without grant", sw_data, 0);
      end else chk("bus idle outside data phase", sw_data, 0);
      if (p == (is_map ? 3 : 4))
        exp_send = grant && ref_q.size() > 0;
      @(posedge clk); #1;
    end
    if (do_load && accept) ref_q.push_back(b);
    load = 0;
    chk("mpxm", mpxm,  is_map && ref_q.size() > 0);
    chk("ipxm", ipxm, !is_map && ref_q.size() > 0);
  endtask

  initial begin
    exp_send = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    mpg = 1; impsel = 1; pqen = 1;
    #1 chk("query empty", qout, 8'h00);

    // overlapped load / send of a 7-byte mapping packet, one grant withheld
    cycle(1, 1, 8'h05, 0, 1);
    chk("query busy", qout, 8'h80);
    cycle(1, 1, 8'h11, 0, 1);
    cycle(1, 1, 8'h12, 1, 1);
    cycle(1, 1, 8'h13, 1, 1);
    cycle(1, 1, 8'h14, 0, 1);   // grant withheld: request stays up
    cycle(1, 1, 8'h15, 1, 1);
    cycle(1, 1, 8'h16, 1, 1);
    for (int i = 0; i < 6; i++) cycle(1, 0, 8'h00, 1, 0);
    chk("drained", ref_q.size(), 0);
    pqen = 1; #1 chk("query empty again", qout, 8'h00);
    pqen = 0; #1 chk("query off", qout, 8'h00);

    // fill completely with no grant; an eighth load is ignored
    for (int i = 0; i < 7; i++) cycle(1, 1, byte_t'(8'h20 + i), 0, 1);
    cycle(1, 1, 8'hEE, 0, 0);
    for (int i = 0; i < 8; i++) cycle(1, 0, 8'h00, 1, 0);
    chk("full buffer drained, overflow byte dropped", ref_q.size(), 0);

    // interrupting packet refused while APG is off
    impsel = 0; apg = 0;
    cycle(0, 1, 8'h77, 0, 0);
    chk("no interrupting request without APG", ipxm, 0);

    // interrupting packet with APG on: IPXM, GI in phase 4, data in phase 1
    apg = 1; mpg = 0;
    for (int i = 0; i < 7; i++) cycle(0, 1, byte_t'(8'h40 + i), (i % 2) == 1, 1);
    cycle(0, 0, 8'h00, 0, 0);
    for (int i = 0; i < 8; i++) cycle(0, 0, 8'h00, 1, 0);
    chk("interrupting packet drained", ref_q.size(), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
