// tb_trac_backplane: self-checking test of the NEG / DIR / END generator.
// Pulses cycle_end once per simulated TRAC cycle and checks every level
// against the backplane timing table: level L is in END in cycle L, NEG in
// cycle L+1, DIR in cycle L+2 and repeats every 8 cycles; between cycle
// steps the outputs must not change.
module tb_trac_backplane;
  localparam int unsigned L = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         cycle_end = 1'b0;
  logic [L:0]   neg, dir, end_s;
  int           checks = 0, failures = 0;

  trac_backplane #(.LEVELS(L)) dut (.clk, .rst, .cycle_end, .neg, .dir, .end_s);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected state of a level in a cycle, straight from the table:
  // cycle c, level l: END when c == l (mod 8), NEG when c == l+1, DIR when c == l+2
  function automatic void expect_state(int c, int l, output bit e_neg, output bit e_dir, output bit e_end);
    int r = ((c - l) % 8 + 8) % 8;
    e_end = (r == 0);
    e_neg = (r == 1);
    e_dir = (r == 2);
  endfunction

  initial begin
    bit en, ed, ee;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < 24; c++) begin
      // two idle clocks: outputs hold
      for (int k = 0; k < 2; k++) begin
        for (int l = 0; l <= L; l++) begin
          expect_state(c, l, en, ed, ee);
          checks++;
          if (neg[l] != en || dir[l] != ed || end_s[l] != ee) begin
            failures++;
            $display("FAIL cycle %0d level %0d: neg/dir/end=%0b%0b%0b expected %0b%0b%0b",
                     c, l, neg[l], dir[l], end_s[l], en, ed, ee);
          end
        end
        @(posedge clk); #1;
      end
      cycle_end = 1'b1;
      @(posedge clk); #1;
      cycle_end = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
