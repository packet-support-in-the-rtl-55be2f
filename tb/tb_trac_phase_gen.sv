// tb_trac_phase_gen: self-checking test of the TRAC phase sequencer.
// Runs the counter for several TRAC cycles after reset and checks that the
// phases come in order 0 .. NUM_PHASES-1, wrap to 0, and that cycle_end is high
// exactly in the last phase.
module tb_trac_phase_gen;
  import trac_pkg::*;

  localparam int unsigned NP = 6;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  phase_t phase;
  logic   cycle_end;
  int     checks = 0, failures = 0;

  trac_phase_gen #(.NUM_PHASES(NP)) dut (.clk, .rst, .phase, .cycle_end);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ph;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    exp_ph = 0;
    for (int i = 0; i < 5 * NP; i++) begin
      checks++;
      if (phase != phase_t'(exp_ph) || cycle_end != (exp_ph == NP - 1)) begin
        failures++;
        $display("FAIL step %0d: phase=%0d cycle_end=%0b expected %0d/%0b",
                 i, phase, cycle_end, exp_ph, exp_ph == NP - 1);
      end
      @(posedge clk); #1;
      exp_ph = (exp_ph + 1) % NP;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
