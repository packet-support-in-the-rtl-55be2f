// tb_trac_pkt_switch: self-checking test of one packet switch node.
//
// The node sits at level 1 of a 4-level network, so it routes by bit 2 of the
// direction byte.  The testbench plays the nodes around it: it drives the
// phase, the backplane state, the requests and data from below and the grants
// from above, and checks pr_up, pg_dn and dout phase by phase against a
// hand-worked script:
//   cycle A (NEG):   mapping requests on B and C -> B granted (A > B > C);
//                    interrupting request on A -> A granted.
//   cycle B (DIR):   mapping header 0x04 (bit 2 = 1) requests right; grant from
//                    above passes down to B only; interrupting header 0x00
//                    requests left and, without a grant from above, blocks.
//   cycle C (blank): bytes move up; the route is kept; grants ripple down.
//   cycle D (END):   node holds the last byte: no grant is passed down.
//   cycle E (NEG):   mapping byte leaves, node empty, new header from C taken.
//   cycle F (blank): a byte entering outside DIR leaves the route unchanged;
//                    a blank-state empty node takes nothing.
//   cycle G (DIR):   a byte already held while DIR comes round (a stalled
//                    train) does not change the route.
module tb_trac_pkt_switch;
  import trac_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  phase_t     phase = '0;
  logic       neg = 0, dir = 0, end_s = 0;
  logic [2:0] pr_dn = '0, pg_dn;
  byte_t      din [3];
  logic [1:0] pr_up, pg_up = '0;
  byte_t      dout [2];
  int         checks = 0, failures = 0;

  trac_pkt_switch #(.LEVELS(4), .LEVEL(1)) dut (
    .clk, .rst, .phase, .neg, .dir, .end_s,
    .pr_dn, .pg_dn, .din, .pr_up, .pg_up, .dout
  );

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic state(bit n, bit d, bit e);
    neg = n; dir = d; end_s = e;
  endtask

  // one phase: drive, let combinational logic settle, caller checks, then clock
  task automatic ph(int p);
    phase = phase_t'(p);
    #1;
  endtask

  task automatic tick();
    @(posedge clk); #1;
    pr_dn = '0; pg_up = '0;
    din[0] = 8'hEE; din[1] = 8'hEE; din[2] = 8'hEE;
  endtask

  initial begin
    din[0] = '0; din[1] = '0; din[2] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // ---------------- cycle A: NEG
    state(1, 0, 0);
    ph(0); chk("A0 dout0", dout[0], 0); chk("A0 dout1", dout[1], 0); tick();
    ph(1); tick();
    ph(2); pr_dn = 3'b111; #1 chk("A2 no grant outside arbitration", pg_dn, 0); tick();
    ph(3); pr_dn = 3'b110; #1;
    chk("A3 pr_up empty", pr_up, 0);
    chk("A3 priority B over C", pg_dn, 3'b010); tick();
    ph(4); pr_dn = 3'b001; #1;
    chk("A4 int grant A", pg_dn, 3'b001); tick();
    ph(5); tick();

    // ---------------- cycle B: DIR
    state(0, 1, 0);
    ph(0); din[1] = 8'h04; din[0] = 8'h55; #1 tick();
    ph(1); din[0] = 8'h00; #1 tick();
    ph(2); tick();
    ph(3); pg_up = 2'b10; pr_dn = 3'b011; #1;
    chk("B3 map requests right", pr_up, 2'b10);
    chk("B3 grant only to connected link B", pg_dn, 3'b010); tick();
    ph(4); pg_up = 2'b00; pr_dn = 3'b001; #1;
    chk("B4 int requests left", pr_up, 2'b01);
    chk("B4 blocked: no grant", pg_dn, 0); tick();
    ph(5); tick();

    // ---------------- cycle C: blank
    state(0, 0, 0);
    ph(0); din[1] = 8'hA1; #1;
    chk("C0 header out right", dout[1], 8'h04);
    chk("C0 left idle", dout[0], 0); tick();
    ph(1); #1 chk("C1 blocked int byte stays", dout[0], 0); tick();
    ph(2); tick();
    ph(3); pg_up = 2'b10; pr_dn = 3'b010; #1;
    chk("C3 route kept right", pr_up, 2'b10);
    chk("C3 grant ripples to B", pg_dn, 3'b010); tick();
    ph(4); pg_up = 2'b01; pr_dn = 3'b101; #1;
    chk("C4 int still left", pr_up, 2'b01);
    chk("C4 int grant to A only", pg_dn, 3'b001); tick();
    ph(5); tick();

    // ---------------- cycle D: END
    state(0, 0, 1);
    ph(0); din[1] = 8'hA2; #1 chk("D0 byte 2 out", dout[1], 8'hA1); tick();
    ph(1); din[0] = 8'hB2; #1 chk("D1 int header out left", dout[0], 8'h00); tick();
    ph(2); tick();
    ph(3); pg_up = 2'b10; pr_dn = 3'b010; #1;
    chk("D3 END: request up", pr_up, 2'b10);
    chk("D3 END: no grant down", pg_dn, 0); tick();
    ph(4); pg_up = 2'b00; pr_dn = 3'b001; #1;
    chk("D4 int blocked", pg_dn, 0); tick();
    ph(5); tick();

    // ---------------- cycle E: NEG
    state(1, 0, 0);
    ph(0); din[1] = 8'h99; #1 chk("E0 last byte out", dout[1], 8'hA2); tick();
    ph(1); #1 chk("E1 int held", dout[0], 0); tick();
    ph(2); tick();
    ph(3); pr_dn = 3'b100; #1;
    chk("E3 empty: no request", pr_up, 0);
    chk("E3 NEG+empty: take header from C", pg_dn, 3'b100); tick();
    ph(4); pg_up = 2'b01; pr_dn = 3'b010; #1;
    chk("E4 int full, grant only to A", pg_dn, 0); tick();
    ph(5); tick();

    // ---------------- cycle F: blank, mapping node full with header from C
    state(0, 0, 0);
    ph(0); din[2] = 8'h00; #1 tick();
    ph(1); #1 chk("F1 int byte B2 out left", dout[0], 8'hB2); tick();
    ph(2); tick();
    ph(3); pr_dn = 3'b001; #1;
    chk("F3 route latched from previous train", pr_up, 2'b10);
    chk("F3 no grant: node full, no PG", pg_dn, 0); tick();
    ph(4); pr_dn = 3'b001; #1;
    chk("F4 int empty blank: no grant", pg_dn, 0); tick();
    ph(5); tick();

    // ---------------- cycle G: DIR while the node holds a body byte (0x00,
    // entered in a blank cycle, as in a stalled train): the route must not
    // be re-derived from it
    state(0, 1, 0);
    ph(0); tick();
    ph(1); tick();
    ph(2); tick();
    ph(3); #1 chk("G3 stalled body byte keeps route right", pr_up, 2'b10); tick();
    ph(4); tick();
    ph(5); tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
