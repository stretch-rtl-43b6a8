// tb_stretch_backend: end-to-end test of the Stretch back-end at its
// default size (192-entry ROB, 64-entry LSQ, 6-wide dispatch and commit).
//
// Two synthetic threads offer a never-ending stream of micro-ops numbered
// in program order. Each micro-op's kind (memory op, store), its address
// and whether it misses for a long time are a fixed hash of its thread and
// number, so a stream refetched after a flush is identical. A model of the
// execution units completes each micro-op after its latency (memory ops
// only after their address was sent to the LSQ). The test walks through
// Baseline, B-mode and Q-mode with either thread as the latency-sensitive
// one, the main splits first and then every other provisioned level, and
// checks:
//  * every thread retires its micro-ops exactly once and in order, with the
//    right kind, and the LSQ releases the same memory ops with the right
//    addresses;
//  * occupancy never exceeds the limit registers, whose values after each
//    mode change match the configurations (Baseline 96/96 ROB and 32/32
//    LSQ entries; B-mode levels 0-4 give the latency-sensitive thread
//    64/56/48/40/32 ROB and 21/19/16/13/11 LSQ entries, Q-mode levels
//    128/136/144/152/160 and 43/45/48/51/53, the other thread the rest);
//  * a mode change flushes for exactly 12 cycles, with nothing dispatched
//    or retired meanwhile; writing an unchanged mode does not flush;
//  * with no misses the core sustains 6 retirements per cycle;
//  * each mechanism happened: ROB-full and LSQ-full stalls, ICOUNT choosing
//    either thread, the other thread filling dispatch and commit slots, the
//    boosted thread filling its large partition, each mode, each flush.
module tb_stretch_backend;
  import stretch_pkg::*;

  localparam int ROB = 192, LSQ = 64, W = 6, CW = 6, WBP = 11, AGP = 2;
  localparam int RIW = $clog2(ROB), LIW = $clog2(LSQ);
  localparam int LONG_LAT = 160;
  localparam int MAX_CYCLES = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic csr_we = 1'b0;
  logic [5:0] csr_wdata = '0, csr_rdata;
  logic [2:0] in_cnt [NT];
  uop_t in_uop [NT][W];
  logic [2:0] in_take [NT];
  logic disp_valid [W], disp_tid [W];
  uop_t disp_uop [W];
  logic [RIW-1:0] disp_rob_idx [W];
  logic [LIW-1:0] disp_lsq_idx [W];
  logic wb_valid [WBP];
  logic [RIW-1:0] wb_idx [WBP];
  logic agu_valid [AGP];
  logic [LIW-1:0] agu_idx [AGP];
  logic [63:0] agu_addr [AGP];
  logic cm_valid [CW], cm_tid [CW];
  uop_t cm_uop [CW];
  logic [RIW-1:0] cm_idx [CW];
  logic lsq_rel_valid [NT][CW], lsq_rel_store [NT][CW];
  logic [63:0] lsq_rel_addr [NT][CW];
  cfg_t cfg_cur;
  logic flush_start, flushing, icount_primary;
  logic [15:0] flush_count;
  logic rob_full [NT], lsq_full [NT];
  logic [7:0] rob_limit [NT], rob_usage [NT];
  logic [6:0] lsq_limit [NT], lsq_usage [NT];

  stretch_backend dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- the synthetic programs ----
  function automatic logic [31:0] mix(input int t, input logic [15:0] tag);
    logic [31:0] x;
    x = {tag, 16'(t * 16'h5bd1 + 16'h1234)} * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA6B;
    return x ^ (x >> 13);
  endfunction
  function automatic bit f_mem(input int t, input logic [15:0] tag);
    // 1/4 memory ops; thread 0 issues 3/8 from micro-op 2048 on, past the
    // throughput window, so that its small LSQ partition fills in B-mode
    return (t == 0 && tag >= 16'd2048) ? (mix(t, tag)[4:2] < 3'd3) : (mix(t, tag)[3:2] == 2'b00);
  endfunction
  function automatic bit f_store(input int t, input logic [15:0] tag);
    return mix(t, tag)[5];
  endfunction
  function automatic logic [63:0] f_addr(input int t, input logic [15:0] tag);
    return {24'hA0_0000, 8'(t), mix(t, tag) ^ 32'h5555_0000};
  endfunction
  bit misses_on = 1'b0;
  function automatic int f_lat(input int t, input logic [15:0] tag);
    logic [31:0] x;
    x = mix(t, tag);
    if (misses_on && x[12:8] == 5'd0) return LONG_LAT;
    return 1 + int'(x[17:16] == 2'b11);
  endfunction

  // ---- model state ----
  logic [15:0] next_fetch [NT];
  logic [15:0] next_commit [NT];
  bit  rob_pend [ROB];
  int  rob_ready [ROB];
  bit  lsq_pend [LSQ];
  int  lsq_rob [LSQ];
  int  lsq_lat [LSQ];
  logic [63:0] lsq_exp_addr [LSQ];

  // ---- mechanism counters ----
  int n_rob_full [NT], n_lsq_full [NT], n_primary [NT];
  int n_disp_fill = 0, n_commit_fill = 0, n_flush = 0, n_store_rel = 0;
  int n_mode [3];
  int n_part_full_big = 0;   // boosted thread at a limit above half the ROB
  int n_part_full_small = 0; // shrunk thread at a limit below half the ROB
  int flush_len = 0;
  int commits_window = 0;

  // ROB and LSQ shares of the latency-sensitive thread, by level
  int rob_b [5] = '{64, 56, 48, 40, 32};
  int lsq_b [5] = '{21, 19, 16, 13, 11};
  int rob_q [5] = '{128, 136, 144, 152, 160};
  int lsq_q [5] = '{43, 45, 48, 51, 53};
  function automatic int exp_rob_limit(input cfg_t c, input int t);
    int ls;
    ls = (c.mode == MODE_B) ? rob_b[c.level] : (c.mode == MODE_Q) ? rob_q[c.level] : 96;
    return (t == int'(c.ls_tid)) ? ls : ROB - ls;
  endfunction
  function automatic int exp_lsq_limit(input cfg_t c, input int t);
    int ls;
    ls = (c.mode == MODE_B) ? lsq_b[c.level] : (c.mode == MODE_Q) ? lsq_q[c.level] : 32;
    return (t == int'(c.ls_tid)) ? ls : LSQ - ls;
  endfunction
  int n_level [5];

  // Inputs are driven right after the falling edge; 1 time unit later the
  // combinational outputs are observed and the model is advanced to what
  // the next rising edge does.
  always @(negedge clk) begin
    if (rst_n) begin
      int nwb, nag;
      // offer micro-ops
      for (int t = 0; t < NT; t++) begin
        in_cnt[t] = 3'(W);
        for (int i = 0; i < W; i++) begin
          logic [15:0] tg;
          tg = next_fetch[t] + 16'(i);
          in_uop[t][i] = '{is_mem: f_mem(t, tg), is_store: f_store(t, tg), tag: tg};
        end
      end
      // addresses of memory ops, AGP per cycle
      nag = 0;
      for (int p = 0; p < AGP; p++) agu_valid[p] = 1'b0;
      for (int e = 0; e < LSQ && nag < AGP; e++)
        if (lsq_pend[e]) begin
          agu_valid[nag] = 1'b1;
          agu_idx[nag]   = LIW'(e);
          agu_addr[nag]  = lsq_exp_addr[e];
          lsq_pend[e]    = 1'b0;
          rob_pend[lsq_rob[e]]  = 1'b1;
          rob_ready[lsq_rob[e]] = cyc + lsq_lat[e];
          nag++;
        end
      // completions, WBP per cycle
      nwb = 0;
      for (int p = 0; p < WBP; p++) wb_valid[p] = 1'b0;
      for (int e = 0; e < ROB && nwb < WBP; e++)
        if (rob_pend[e] && rob_ready[e] <= cyc) begin
          wb_valid[nwb] = 1'b1;
          wb_idx[nwb]   = RIW'(e);
          rob_pend[e]   = 1'b0;
          nwb++;
        end
      #1;
      observe();
    end
  end

  task automatic observe();
    int ncm, nd, cm_t [NT], mem_seen [NT];
    // partition bounds
    for (int t = 0; t < NT; t++) begin
      check(rob_usage[t] <= rob_limit[t], "ROB usage above limit");
      check(lsq_usage[t] <= lsq_limit[t], "LSQ usage above limit");
      check(int'(rob_limit[t]) == exp_rob_limit(cfg_cur, t), "ROB limit differs from configuration");
      check(int'(lsq_limit[t]) == exp_lsq_limit(cfg_cur, t), "LSQ limit differs from configuration");
      if (rob_usage[t] == rob_limit[t] && rob_limit[t] > 8'(ROB / 2)) n_part_full_big++;
      if (rob_usage[t] == rob_limit[t] && rob_limit[t] < 8'(ROB / 2)) n_part_full_small++;
      if (rob_full[t]) n_rob_full[t]++;
      if (lsq_full[t]) n_lsq_full[t]++;
    end
    n_mode[cfg_cur.mode]++;
    if (cfg_cur.mode != MODE_BASE) n_level[cfg_cur.level]++;
    if (flushing) begin
      flush_len++;
      for (int s = 0; s < W; s++)  check(!disp_valid[s], "dispatch during flush");
      for (int s = 0; s < CW; s++) check(!cm_valid[s], "commit during flush");
    end else if (flush_len != 0) begin
      check(flush_len == 12, $sformatf("flush lasted %0d cycles", flush_len));
      flush_len = 0;
    end
    if (flush_start) begin
      n_flush++;
      for (int e = 0; e < ROB; e++) rob_pend[e] = 1'b0;
      for (int e = 0; e < LSQ; e++) lsq_pend[e] = 1'b0;
      for (int t = 0; t < NT; t++) next_fetch[t] = next_commit[t];
      return;
    end
    // dispatch
    nd = 0;
    cm_t[0] = 0; cm_t[1] = 0;
    for (int s = 0; s < W; s++)
      if (disp_valid[s]) begin
        int t;
        logic [15:0] tg;
        t  = int'(disp_tid[s]);
        tg = next_fetch[t] + 16'(cm_t[t]);
        cm_t[t]++;
        nd++;
        check(disp_uop[s].tag == tg, "dispatch out of program order");
        if (disp_uop[s].is_mem) begin
          lsq_pend[disp_lsq_idx[s]]     = 1'b1;
          lsq_rob[disp_lsq_idx[s]]      = int'(disp_rob_idx[s]);
          lsq_lat[disp_lsq_idx[s]]      = f_lat(t, tg);
          lsq_exp_addr[disp_lsq_idx[s]] = f_addr(t, tg);
        end else begin
          rob_pend[disp_rob_idx[s]]  = 1'b1;
          rob_ready[disp_rob_idx[s]] = cyc + f_lat(t, tg);
        end
      end
    for (int t = 0; t < NT; t++) begin
      check(int'(in_take[t]) == cm_t[t], "in_take disagrees with dispatch slots");
      next_fetch[t] += 16'(cm_t[t]);
    end
    if (cm_t[0] > 0 && cm_t[1] > 0) n_disp_fill++;
    if (nd > 0) n_primary[icount_primary]++;
    if (nd > 0)
      check(in_take[icount_primary] > 0 || rob_full[icount_primary] || lsq_full[icount_primary],
            "ICOUNT thread skipped without a full partition");
    // commit
    ncm = 0;
    cm_t[0] = 0; cm_t[1] = 0;
    mem_seen[0] = 0; mem_seen[1] = 0;
    for (int s = 0; s < CW; s++)
      if (cm_valid[s]) begin
        int t;
        t = int'(cm_tid[s]);
        ncm++;
        cm_t[t]++;
        check(cm_uop[s].tag == next_commit[t], $sformatf("thread %0d retired %0d, expected %0d",
              t, cm_uop[s].tag, next_commit[t]));
        check(cm_uop[s].is_mem == f_mem(t, next_commit[t]), "retired micro-op has wrong kind");
        if (cm_uop[s].is_mem) begin
          check(lsq_rel_valid[t][mem_seen[t]], "memory op retired without LSQ release");
          check(lsq_rel_store[t][mem_seen[t]] == f_store(t, next_commit[t]), "LSQ release kind");
          check(lsq_rel_addr[t][mem_seen[t]] == f_addr(t, next_commit[t]), "LSQ release address");
          if (lsq_rel_store[t][mem_seen[t]]) n_store_rel++;
          mem_seen[t]++;
        end
        next_commit[t]++;
      end
    for (int t = 0; t < NT; t++)
      for (int k = mem_seen[t]; k < CW; k++) check(!lsq_rel_valid[t][k], "extra LSQ release");
    if (cm_t[0] > 0 && cm_t[1] > 0) n_commit_fill++;
    check(ncm <= CW && nd <= W, "width exceeded");
    if (cyc >= 150 && cyc < 300) commits_window += ncm;
  endtask

  task automatic write_mode(input bit s, input bit bq, input bit ls, input int lvl);
    @(negedge clk);
    csr_we = 1'b1;
    csr_wdata = {3'(lvl), ls, bq, s};
    @(negedge clk);
    csr_we = 1'b0;
    check(csr_rdata == {3'(lvl), ls, bq, s}, "control register read-back");
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    for (int t = 0; t < NT; t++) begin
      next_fetch[t] = '0; next_commit[t] = '0;
      n_rob_full[t] = 0; n_lsq_full[t] = 0; n_primary[t] = 0;
      in_cnt[t] = '0;
      for (int i = 0; i < W; i++) in_uop[t][i] = '0;
    end
    for (int m = 0; m < 3; m++) n_mode[m] = 0;
    for (int e = 0; e < ROB; e++) begin rob_pend[e] = 1'b0; rob_ready[e] = 0; end
    for (int e = 0; e < LSQ; e++) lsq_pend[e] = 1'b0;
    for (int p = 0; p < WBP; p++) begin wb_valid[p] = 1'b0; wb_idx[p] = '0; end
    for (int p = 0; p < AGP; p++) begin agu_valid[p] = 1'b0; agu_idx[p] = '0; agu_addr[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Baseline without misses: full throughput
    wait (cyc == 300);
    check(commits_window == 150 * CW,
          $sformatf("%0d retirements in 150 miss-free cycles, expected %0d", commits_window, 150 * CW));
    misses_on = 1'b1;
    wait (cyc == 2300);
    write_mode(1'b1, 1'b0, 1'b0, 1);  // B-mode 56-136, thread 0 latency-sensitive
    wait (cyc == 4300);
    write_mode(1'b1, 1'b1, 1'b0, 1);  // Q-mode 136-56, thread 0
    wait (cyc == 6300);
    write_mode(1'b1, 1'b0, 1'b1, 1);  // B-mode 56-136, thread 1
    wait (cyc == 8300);
    write_mode(1'b1, 1'b0, 1'b1, 1);  // same configuration again: no flush
    wait (cyc == 9300);
    check(flush_count == 16'd3, $sformatf("flush count %0d, expected 3", flush_count));
    write_mode(1'b1, 1'b1, 1'b1, 1);  // Q-mode 136-56, thread 1
    wait (cyc == 11300);
    write_mode(1'b0, 1'b1, 1'b1, 1);  // S clear: Baseline
    wait (cyc == 13300);
    check(flush_count == 16'd5 && n_flush == 5, "five mode changes, five flushes");
    // the other provisioned splits, 1000 cycles each
    for (int k = 0; k < 5; k++) begin
      if (k == 1) continue;
      write_mode(1'b1, 1'b0, 1'(k), k);
      wait (cyc == 13300 + 2000 * (k - (k > 1 ? 1 : 0)) + 1000);
      write_mode(1'b1, 1'b1, 1'(~k), k);
      wait (cyc == 13300 + 2000 * (k - (k > 1 ? 1 : 0)) + 2000);
    end
    check(flush_count == 16'd13 && n_flush == 13, "thirteen configuration changes, thirteen flushes");
    for (int k = 0; k < 5; k++) check(n_level[k] > 0, $sformatf("level %0d never in force", k));
    check(next_commit[0] > 16'd3000 && next_commit[1] > 16'd3000, "both threads make progress");
    for (int t = 0; t < NT; t++) begin
      check(n_rob_full[t] > 0, $sformatf("ROB-full stall of thread %0d never happened", t));
      check(n_lsq_full[t] > 0, $sformatf("LSQ-full stall of thread %0d never happened", t));
      check(n_primary[t] > 0, $sformatf("ICOUNT never chose thread %0d", t));
    end
    check(n_disp_fill > 0, "other thread never filled dispatch slots");
    check(n_commit_fill > 0, "other thread never filled commit slots");
    check(n_part_full_big > 0, "boosted thread never filled its large partition");
    check(n_part_full_small > 0, "shrunk thread never filled its small partition");
    check(n_store_rel > 0, "no store left the LSQ");
    for (int m = 0; m < 3; m++) check(n_mode[m] > 0, $sformatf("mode %0d never in force", m));
    $display("mechanisms: rob_full=%0d/%0d lsq_full=%0d/%0d icount=%0d/%0d disp_fill=%0d commit_fill=%0d",
             n_rob_full[0], n_rob_full[1], n_lsq_full[0], n_lsq_full[1], n_primary[0], n_primary[1],
             n_disp_fill, n_commit_fill);
    $display("mechanisms: big_full=%0d small_full=%0d flushes=%0d stores=%0d modes=%0d/%0d/%0d retired=%0d/%0d",
             n_part_full_big, n_part_full_small, n_flush, n_store_rel, n_mode[0], n_mode[1], n_mode[2],
             next_commit[0], next_commit[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
