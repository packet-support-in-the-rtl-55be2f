// tb_trac_packet_net: end-to-end test of the TRAC packet network at its
// default size (4 routing levels, 81 memory modules, 16 processors).
//
// Memory-side senders load packets into the transmitters the way a processor
// would: wait until the PQEN query shows an empty buffer, then write the seven
// bytes in seven consecutive cycles.  Processor-side models read each packet
// as soon as it arrives (select with SMP/SIP, one RP per allowed phase,
// release with a final SMP/SIP) and compare it with the scoreboard.
//
// Timing reference: the backplane pattern starts with level 0 in END at
// cycle 0, so level 0 is in NEG in cycles 1, 9, 17, ...  A packet whose first
// byte is loaded in cycle c is first offered to the network in the first such
// cycle X after c; without blocking MPA/IPA rises in cycle X+5 and the last
// byte arrives in cycle X+11.  Each blockage adds exactly 8 cycles.
//
// Scenarios, each counted; a scenario that never happens is a failure:
//   unblocked      mapping and interrupting packets arrive after 5 cycles
//   last_byte      the last byte arrives 6 cycles after the first
//   head_to_head   two packets meet at a node: the one on input A goes first,
//                  the other is 8 cycles late
//   three_way      three packets meet: 0, 8 and 16 cycles late
//   map_and_int    a mapping and an interrupting packet reach one processor
//                  at the same time without delaying each other
//   back_to_back   three packets from one memory arrive 8 cycles apart and
//                  in order (6 data bytes per 8 cycles)
//   query_busy     a sender finds its transmitter busy and waits
//   head_to_body   a packet is stopped by the stalled body of another train
//                  and proceeds a multiple of 8 cycles late
//   receiver_full  a packet waits at a receiver whose buffer is not released
//   broken         packets to a processor with its broke bit set are
//                  absorbed without being read
module tb_trac_packet_net;
  import trac_pkg::*;

  localparam int unsigned LV     = 4;
  localparam int unsigned N_MEM  = 3 ** LV;
  localparam int unsigned N_PROC = 2 ** LV;
  localparam int          NJ     = 18;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  phase_t phase;

  logic   mem_mpg [N_MEM], mem_apg [N_MEM], mem_impsel [N_MEM], mem_pqen [N_MEM], mem_load [N_MEM];
  byte_t  mem_din [N_MEM], mem_dout [N_MEM];
  logic   mem_mpxm [N_MEM], mem_ipxm [N_MEM];
  logic   proc_smp [N_PROC], proc_sip [N_PROC], proc_rp [N_PROC], proc_broken [N_PROC];
  logic   proc_mpa [N_PROC], proc_ipa [N_PROC], proc_rd_ready [N_PROC];
  byte_t  proc_dout [N_PROC];

  trac_packet_net dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && phase == phase_t'(5)) cyc <= cyc + 1;

  initial begin
    #60000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    int    mem, dest, start, exp_blk;   // exp_blk -1: blocked, any count >= 1; -2: any count
    bit    is_map, chk_last;
    string tag;
    byte_t d [7];
    int    load_cyc, arr_cyc;
    bit    started, done;
  } job_t;

  job_t jobs [NJ];
  int   nj = 0;

  int n_unblocked = 0, n_last = 0, n_h2h = 0, n_three = 0, n_mapint = 0;
  int n_b2b = 0, n_query = 0, n_h2b = 0, n_rxfull = 0, n_broken = 0;

  function automatic void add_job(int mem, int dest, bit is_map, int start,
                                  int exp_blk, string tag, bit chk_last = 0);
    job_t j;
    j.mem = mem; j.dest = dest; j.is_map = is_map; j.start = start;
    j.exp_blk = exp_blk; j.tag = tag; j.chk_last = chk_last;
    j.d[0] = byte_t'(dest);
    j.d[1] = byte_t'(nj);
    for (int i = 2; i < 7; i++) j.d[i] = byte_t'($urandom);
    j.load_cyc = -1; j.arr_cyc = -1; j.started = 0; j.done = 0;
    jobs[nj] = j;
    nj++;
  endfunction

  // first cycle after c in which level 0 is in NEG
  function automatic int first_neg(int c);
    int x = c + 1;
    while (x % 8 != 1) x++;
    return x;
  endfunction

  // ------------------------------------------------------------ senders
  int ld_job [N_MEM];
  int ld_idx [N_MEM];

  initial begin
    for (int m = 0; m < N_MEM; m++) begin
      mem_mpg[m] = 1; mem_apg[m] = 1; mem_impsel[m] = 1; mem_pqen[m] = 1;
      mem_load[m] = 0; mem_din[m] = '0; ld_job[m] = -1; ld_idx[m] = 0;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      for (int m = 0; m < N_MEM; m++) begin
        mem_load[m] = 0;
        if (phase == PH_INT_ARB) begin
          if (ld_job[m] >= 0) begin
            mem_load[m] = 1;
            mem_din[m]  = jobs[ld_job[m]].d[ld_idx[m]];
            ld_idx[m]++;
            if (ld_idx[m] == 7) ld_job[m] = -1;
          end else begin
            // next job of this memory, in list order
            for (int j = 0; j < nj; j++) begin
              if (jobs[j].mem == m && !jobs[j].started) begin
                if (jobs[j].start <= cyc) begin
                  if (mem_dout[m][7]) begin
                    if (jobs[j].tag == "b2b") n_query++;
                  end else begin
                    jobs[j].started  = 1;
                    jobs[j].load_cyc = cyc;
                    mem_impsel[m]    = jobs[j].is_map;
                    mem_load[m]      = 1;
                    mem_din[m]       = jobs[j].d[0];
                    ld_job[m]        = j;
                    ld_idx[m]        = 1;
                  end
                end
                break;
              end
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ processors
  typedef enum int {P_IDLE, P_READ, P_RELEASE} pst_e;
  pst_e  pst   [N_PROC];
  bit    pch   [N_PROC];   // 1 = mapping buffer selected
  int    nrd   [N_PROC];
  byte_t pbuf  [N_PROC][7];
  bit    hold  [N_PROC];
  bit    prev_mpa [N_PROC], prev_ipa [N_PROC];
  int    arr_map [N_PROC], arr_int [N_PROC], last_cyc [N_PROC];
  int    b2b_last = -1;

  initial begin
    for (int q = 0; q < N_PROC; q++) begin
      proc_smp[q] = 0; proc_sip[q] = 0; proc_rp[q] = 0; proc_broken[q] = 0;
      pst[q] = P_IDLE; pch[q] = 0; nrd[q] = 0; hold[q] = 0;
      prev_mpa[q] = 0; prev_ipa[q] = 0; arr_map[q] = -1; arr_int[q] = -1;
    end
  end

  task automatic packet_done(int q, bit is_map);
    int arr = is_map ? arr_map[q] : arr_int[q];
    int j;
    for (j = 0; j < nj; j++)
      if (!jobs[j].done && jobs[j].started && jobs[j].dest == q && jobs[j].is_map == is_map &&
          jobs[j].d[1] == pbuf[q][1]) break;
    checks++;
    if (j == nj) begin
      failures++;
      $display("FAIL cycle %0d: processor %0d got an unexpected packet", cyc, q);
      return;
    end
    jobs[j].done = 1;
    jobs[j].arr_cyc = arr;
    for (int i = 0; i < 7; i++) chk($sformatf("%s job %0d byte %0d", jobs[j].tag, j, i), pbuf[q][i], jobs[j].d[i]);
    begin
      int x   = first_neg(jobs[j].load_cyc);
      int lat = arr - x;
      int k   = (lat - 5) / 8;
      checks++;
      if (lat < 5 || (lat - 5) % 8 != 0 || (jobs[j].exp_blk >= 0 && k != jobs[j].exp_blk)
          || (jobs[j].exp_blk == -1 && k < 1)) begin
        failures++;
        $display("FAIL %s job %0d: arrival %0d cycles after first offer, expected 5 + 8 x %0d",
                 jobs[j].tag, j, lat, jobs[j].exp_blk);
      end else begin
        $display("  %-12s job %2d mem %2d -> proc %2d %s: first byte %0d cycles after offer (%0d blockages)",
                 jobs[j].tag, j, jobs[j].mem, q, is_map ? "map" : "int", lat, k);
        if (k == 0) n_unblocked++;
        if (jobs[j].tag == "h2h" && k == 1) n_h2h++;
        if (jobs[j].tag == "three" && k == 2) n_three++;
        if (jobs[j].tag == "h2b" && k >= 1) n_h2b++;
        if (jobs[j].tag == "rxfull" && k >= 1) n_rxfull++;
        if (jobs[j].tag == "mapint" && k == 0) n_mapint++;
        if (jobs[j].tag == "b2b") begin
          if (b2b_last >= 0) begin
            chk("back-to-back spacing", arr - b2b_last, 8);
            if (arr - b2b_last == 8) n_b2b++;
          end
          b2b_last = arr;
        end
      end
    end
    if (jobs[j].chk_last) begin
      chk("last byte 6 cycles after the first", last_cyc[q] - arr, 6);
      if (last_cyc[q] - arr == 6) n_last++;
    end
  endtask

  always @(negedge clk) begin
    if (!rst) begin
      for (int q = 0; q < N_PROC; q++) begin
        proc_smp[q] = 0; proc_sip[q] = 0; proc_rp[q] = 0;
        if (proc_mpa[q] && !prev_mpa[q]) arr_map[q] = cyc;
        if (proc_ipa[q] && !prev_ipa[q]) arr_int[q] = cyc;
        if (proc_broken[q] && !proc_mpa[q] && prev_mpa[q]) n_broken++;
        prev_mpa[q] = proc_mpa[q];
        prev_ipa[q] = proc_ipa[q];
        if (!proc_broken[q] && !hold[q]) begin
          unique case (pst[q])
            P_IDLE:
              if (proc_mpa[q]) begin
                proc_smp[q] = 1; pch[q] = 1; nrd[q] = 0; pst[q] = P_READ;
              end else if (proc_ipa[q]) begin
                proc_sip[q] = 1; pch[q] = 0; nrd[q] = 0; pst[q] = P_READ;
              end
            P_READ:
              if (proc_rd_ready[q] && phase != PH_MAP_DATA && phase != PH_INT_DATA) begin
                pbuf[q][nrd[q]] = proc_dout[q];
                proc_rp[q] = 1;
                nrd[q]++;
                if (nrd[q] == 7) begin
                  last_cyc[q] = cyc;
                  pst[q] = P_RELEASE;
                end
              end
            P_RELEASE: begin
              if (pch[q]) proc_smp[q] = 1; else proc_sip[q] = 1;
              packet_done(q, pch[q]);
              pst[q] = P_IDLE;
            end
            default: pst[q] = P_IDLE;
          endcase
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    // unblocked mapping and interrupting packets
    add_job( 0,  5, 1,   2, 0, "single", 1);
    add_job(40,  6, 0,   2, 0, "single", 1);
    // head-to-head at level-1 node fed by memories 0 and 1
    add_job( 0,  0, 1,  30, 0, "h2h");
    add_job( 1,  0, 1,  30, 1, "h2h");
    // three-way collision at the node fed by memories 3, 4, 5
    add_job( 3,  2, 1,  60, 0, "three");
    add_job( 4,  2, 1,  60, 1, "three");
    add_job( 5,  2, 1,  60, 2, "three");
    // mapping and interrupting packets into one processor at once
    add_job( 6,  7, 1, 100, 0, "mapint");
    add_job( 7,  7, 0, 100, 0, "mapint");
    // back-to-back packets from one memory
    add_job(10,  9, 1, 130, 0, "b2b");
    add_job(10,  9, 1, 130, 0, "b2b");
    add_job(10,  9, 1, 130, 0, "b2b");
    // head-to-body: processor 12 holds its buffer, so the second packet from
    // memory 20 stalls across levels 0-3; memory 19's packet to processor 13
    // needs the level-1 node that holds a byte of it
    add_job(20, 12, 1, 170, 0, "single");
    add_job(20, 12, 1, 170, -1, "rxfull");
    add_job(19, 13, 1, 200, -1, "h2b");
    // broken processor 15
    add_job(30, 15, 1, 260, 0, "broken");
    add_job(30, 15, 1, 260, 0, "broken");

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    hold[12] = 1;
    proc_broken[15] = 1;
    wait (cyc == 230);
    hold[12] = 0;
    wait (cyc == 330);

    for (int j = 0; j < nj; j++) begin
      if (jobs[j].tag == "broken") begin
        chk($sformatf("broken job %0d left its transmitter", j), jobs[j].started, 1);
        continue;
      end
      chk($sformatf("job %0d (%s) delivered", j, jobs[j].tag), jobs[j].done, 1);
    end
    chk("memory 30 transmitter empty", mem_dout[30][7], 0);
    chk("processor 15 buffer absorbed", proc_mpa[15], 0);
    chk("in order from one memory", jobs[9].arr_cyc < jobs[10].arr_cyc && jobs[10].arr_cyc < jobs[11].arr_cyc, 1);

    $display("mechanisms: unblocked=%0d last_byte=%0d head_to_head=%0d three_way=%0d map_and_int=%0d",
             n_unblocked, n_last, n_h2h, n_three, n_mapint);
    $display("            back_to_back=%0d query_busy=%0d head_to_body=%0d receiver_full=%0d broken=%0d",
             n_b2b, n_query, n_h2b, n_rxfull, n_broken);
    checks++; if (n_unblocked == 0) begin failures++; $display("FAIL no unblocked delivery"); end
    checks++; if (n_last      == 0) begin failures++; $display("FAIL last-byte timing never seen"); end
    checks++; if (n_h2h       == 0) begin failures++; $display("FAIL no head-to-head blockage"); end
    checks++; if (n_three     == 0) begin failures++; $display("FAIL no three-way collision"); end
    checks++; if (n_mapint    <  2) begin failures++; $display("FAIL mapping/interrupting overlap not seen"); end
    checks++; if (n_b2b       <  2) begin failures++; $display("FAIL back-to-back spacing not seen"); end
    checks++; if (n_query     == 0) begin failures++; $display("FAIL busy query never seen"); end
    checks++; if (n_h2b       == 0) begin failures++; $display("FAIL no head-to-body blockage"); end
    checks++; if (n_rxfull    == 0) begin failures++; $display("FAIL no receiver-full blockage"); end
    checks++; if (n_broken    <  2) begin failures++; $display("FAIL broken processor did not absorb both packets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
