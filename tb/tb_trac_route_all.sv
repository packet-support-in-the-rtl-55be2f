// tb_trac_route_all: every memory module sends one mapping packet to every
// processor, on two network sizes side by side:
//   g_net[0]  the default network, 4 levels: 81 memories x 16 processors;
//   g_net[1]  2 levels: 9 memories x 4 processors, the size of the small
//             routing example (left/right by the processor number's bits,
//             most significant first, from any memory).
// All memories stream at once.  Memory m sends its packets to processors
// (m + r) mod N_PROC for r = 0, 1, ..., each as soon as its transmit buffer
// reads empty through the query bit, so the network is heavily loaded and
// packets block each other.  Payload bytes: source memory, round number and
// four bytes computed from both, so a packet that arrives can be identified
// and checked without a stored copy.
// Checks per packet: it arrives at the processor named by its direction
// byte, all seven bytes are intact, no (memory, processor) pair is
// delivered twice, and the first byte arrives (levels + 1) + 8 x k cycles
// after the packet was first offered to the network (one cycle per switch
// level and one into the receiver; k blockages, any k >= 0).
// At the end every pair must have been delivered, and both unblocked and
// blocked packets must have occurred.  The processor model selects, reads
// and releases each buffer as soon as bytes are there.
module tb_trac_route_all;
  import trac_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   n_unblocked = 0, n_blocked = 0;
  int   n_done [2];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_t pay(int m, int r, int i);
    return byte_t'((m * 37 + r * 11 + i * 73 + m * r) ^ (i << 4));
  endfunction

  // first cycle after c in which level 0 is in NEG
  function automatic int first_neg(int c);
    int x = c + 1;
    while (x % 8 != 1) x++;
    return x;
  endfunction

  for (genvar s = 0; s < 2; s++) begin : g_net
    localparam int unsigned LV     = (s == 0) ? 4 : 2;
    localparam int unsigned N_MEM  = 3 ** LV;
    localparam int unsigned N_PROC = 2 ** LV;

    phase_t phase;
    logic   mem_mpg [N_MEM], mem_apg [N_MEM], mem_impsel [N_MEM], mem_pqen [N_MEM], mem_load [N_MEM];
    byte_t  mem_din [N_MEM], mem_dout [N_MEM];
    logic   mem_mpxm [N_MEM], mem_ipxm [N_MEM];
    logic   proc_smp [N_PROC], proc_sip [N_PROC], proc_rp [N_PROC], proc_broken [N_PROC];
    logic   proc_mpa [N_PROC], proc_ipa [N_PROC], proc_rd_ready [N_PROC];
    byte_t  proc_dout [N_PROC];

    trac_packet_net #(.LEVELS(LV)) dut (.*);

    int cyc = 0;
    always @(posedge clk) if (!rst && phase == phase_t'(5)) cyc <= cyc + 1;

    // ---------------------------------------------------------- senders
    int round  [N_MEM];   // next round to send
    int idx    [N_MEM];   // next byte of the packet being loaded, 0 = idle
    int ld_cyc [N_MEM][N_PROC];
    bit got    [N_MEM][N_PROC];

    initial begin
      for (int m = 0; m < N_MEM; m++) begin
        mem_mpg[m] = 1; mem_apg[m] = 0; mem_impsel[m] = 1; mem_pqen[m] = 1;
        mem_load[m] = 0; mem_din[m] = '0; round[m] = 0; idx[m] = 0;
        for (int q = 0; q < N_PROC; q++) got[m][q] = 0;
      end
    end

    always @(negedge clk) begin
      if (!rst) begin
        for (int m = 0; m < N_MEM; m++) begin
          mem_load[m] = 0;
          if (phase == PH_INT_ARB && round[m] < N_PROC) begin
            int dest;
            dest = (m + round[m]) % N_PROC;
            if (idx[m] == 0 && !mem_dout[m][7]) begin
              ld_cyc[m][dest] = cyc;
              mem_load[m] = 1;
              mem_din[m]  = byte_t'(dest);
              idx[m]      = 1;
            end else if (idx[m] > 0) begin
              mem_load[m] = 1;
              mem_din[m]  = (idx[m] == 1) ? byte_t'(m) :
                            (idx[m] == 2) ? byte_t'(round[m]) : pay(m, round[m], idx[m]);
              idx[m]++;
              if (idx[m] == 7) begin
                idx[m] = 0;
                round[m]++;
              end
            end
          end
        end
      end
    end

    // ---------------------------------------------------------- processors
    bit    busy  [N_PROC];
    int    nrd   [N_PROC];
    int    arr   [N_PROC];
    bit    prev  [N_PROC];
    byte_t pbuf  [N_PROC][7];

    initial begin
      n_done[s] = 0;
      for (int q = 0; q < N_PROC; q++) begin
        proc_smp[q] = 0; proc_sip[q] = 0; proc_rp[q] = 0; proc_broken[q] = 0;
        busy[q] = 0; nrd[q] = 0; arr[q] = 0; prev[q] = 0;
      end
    end

    task automatic packet_done(int q);
      int m = int'(pbuf[q][1]);
      int r = int'(pbuf[q][2]);
      int lat, k;
      bit ok = 1;
      checks++;
      if (int'(pbuf[q][0]) != q || m >= N_MEM || r >= N_PROC || (m + r) % N_PROC != q) begin
        failures++;
        $display("FAIL net %0d cycle %0d: processor %0d got a misrouted packet %p", s, cyc, q, pbuf[q]);
        return;
      end
      for (int i = 3; i < 7; i++) if (pbuf[q][i] != pay(m, r, i)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL net %0d: packet mem %0d -> proc %0d corrupted %p", s, m, q, pbuf[q]);
      end
      checks++;
      if (got[m][q]) begin
        failures++;
        $display("FAIL net %0d: packet mem %0d -> proc %0d delivered twice", s, m, q);
      end
      got[m][q] = 1;
      n_done[s]++;
      lat = arr[q] - first_neg(ld_cyc[m][q]);
      k   = (lat - int'(LV) - 1) / 8;
      checks++;
      if (lat < int'(LV) + 1 || (lat - int'(LV) - 1) % 8 != 0) begin
        failures++;
        $display("FAIL net %0d: mem %0d -> proc %0d first byte %0d cycles after offer, not %0d + 8k",
                 s, m, q, lat, LV + 1);
      end else if (k == 0) n_unblocked++;
      else n_blocked++;
    endtask

    always @(negedge clk) begin
      if (!rst) begin
        for (int q = 0; q < N_PROC; q++) begin
          proc_smp[q] = 0; proc_rp[q] = 0;
          if (proc_mpa[q] && !prev[q]) arr[q] = cyc;
          prev[q] = proc_mpa[q];
          if (!busy[q]) begin
            if (proc_mpa[q]) begin
              proc_smp[q] = 1; busy[q] = 1; nrd[q] = 0;
            end
          end else if (nrd[q] < 7) begin
            if (proc_rd_ready[q] && phase != PH_MAP_DATA && phase != PH_INT_DATA) begin
              pbuf[q][nrd[q]] = proc_dout[q];
              proc_rp[q] = 1;
              nrd[q]++;
            end
          end else begin
            proc_smp[q] = 1;
            busy[q] = 0;
            packet_done(q);
          end
        end
      end
    end

    task automatic final_check();
      int missing = 0;
      for (int m = 0; m < N_MEM; m++)
        for (int q = 0; q < N_PROC; q++) if (!got[m][q]) missing++;
      checks++;
      if (missing != 0) begin
        failures++;
        $display("FAIL net %0d: %0d of %0d packets never arrived", s, missing, N_MEM * N_PROC);
      end
      $display("net %0d (%0d levels): %0d of %0d memory-to-processor packets delivered in %0d cycles",
               s, LV, n_done[s], N_MEM * N_PROC, cyc);
    endtask
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (n_done[0] == 81 * 16 && n_done[1] == 9 * 4);
    repeat (60) @(posedge clk);
    g_net[0].final_check();
    g_net[1].final_check();
    checks++;
    if (n_unblocked == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL unblocked %0d, blocked %0d: both must occur", n_unblocked, n_blocked);
    end
    $display("unblocked packets %0d, blocked packets %0d", n_unblocked, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
