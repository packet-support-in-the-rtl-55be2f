// tb_trac_workload_map: intra-task and inter-task traffic patterns on the
// full-size TRAC packet network (16 processors, 81 memory modules).
//
// Processor p sends from memory module 5p (its mapping source) and 5p+2 (its
// interrupting source).  Three workloads, one after the other:
//   permutation      every processor sends one mapping packet to processor
//                    (p + 5) mod 16 at the same moment;
//   data collection  every processor sends one mapping packet to processor 0;
//   mixed            a second permutation, (3p + 1) mod 16, while every
//                    processor also sends an interrupting packet to
//                    processor 15 (the operating system).
// Every packet must arrive intact, exactly 5 + 8 x (number of blockages)
// cycles after it was first offered to the network; packets into one
// receiver must be at least 8 cycles apart, and during data collection
// processor 0's receiver must be kept saturated: one packet per 8 cycles.
// Sender and processor models are the same as in tb_trac_packet_net.
module tb_trac_workload_map;
  import trac_pkg::*;

  localparam int unsigned LV     = 4;
  localparam int unsigned N_MEM  = 3 ** LV;
  localparam int unsigned N_PROC = 2 ** LV;
  localparam int          NJ     = 64;

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
    #200000;
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
      $display("FAIL cycle %0d: processor %0d got an unexpected packet %p", cyc, q, pbuf[q]);
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
  int first0 = -1, last0 = -1, n0 = 0, min_gap0 = 1000;

  always @(negedge clk)
    if (!rst && proc_mpa[0] && !prev_mpa_seen0) begin
      if (last0 >= 0 && cyc - last0 < min_gap0) min_gap0 = cyc - last0;
      if (first0 < 0 && cyc >= 80 && cyc < 300) first0 = cyc;
      if (cyc >= 80 && cyc < 300) begin last0 = cyc; n0++; end
    end
  bit prev_mpa_seen0 = 0;
  always @(negedge clk) prev_mpa_seen0 <= proc_mpa[0];

  initial begin
    for (int p = 0; p < 16; p++) add_job(5 * p, (p + 5) % 16, 1, 2, -2, "perm");
    for (int p = 0; p < 16; p++) add_job(5 * p, 0, 1, 80, -2, "collect");
    for (int p = 0; p < 16; p++) add_job(5 * p, (3 * p + 1) % 16, 1, 300, -2, "mixed");
    for (int p = 0; p < 16; p++) add_job(5 * p + 2, 15, 0, 300, -2, "mixed_int");

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (cyc == 560);

    for (int j = 0; j < nj; j++)
      chk($sformatf("job %0d (%s) delivered", j, jobs[j].tag), jobs[j].done, 1);
    checks++;
    if (min_gap0 < 8) begin
      failures++;
      $display("FAIL packets into processor 0 only %0d cycles apart", min_gap0);
    end
    // a saturated receiver takes exactly one packet per 8-cycle period
    chk("collection: packets into processor 0", n0, 16);
    chk("collection: receiver saturated, 8 cycles per packet", last0 - first0, 8 * 15);
    $display("data collection: %0d packets into processor 0 in %0d cycles (first to last arrival), min spacing %0d",
             n0, last0 - first0, min_gap0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
