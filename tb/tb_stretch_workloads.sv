// tb_stretch_workloads: a colocation workload on the Stretch back-end at
// its default size. It shows the effect that the partition modes exist
// for, not only that they are applied correctly.
//
// Thread 0 plays the latency-sensitive service. Its long misses (200
// cycles, one every 24 micro-ops) form a dependent chain, like pointer
// chasing: a miss cannot start before the previous one has returned. Its
// throughput is therefore about 24 micro-ops per 200 cycles whatever its
// ROB partition, as long as the partition holds one chain link (24
// entries). Thread 1 plays the batch job. Its long misses (200 cycles, one
// micro-op in 8) are independent, so every miss in its window overlaps and
// its throughput grows with its ROB partition P: roughly P micro-ops per
// 200 + P/6 cycles, i.e. 0.44 per cycle at P = 96, 0.61 at P = 136 and 0.27
// at P = 56. One micro-op in 8 of either thread is a memory op, so the LSQ
// partitions (32, 45 or 19 entries) never bind before the ROB does.
//
// The run spends 5000 cycles in each of Baseline, B-mode 56-136 and Q-mode
// 136-56 (thread 0 latency-sensitive) and counts each thread's retirements
// over the last 4000 cycles of each phase. It checks:
//  * the batch thread gains at least 25% in B-mode and loses at least 25%
//    in Q-mode, against Baseline (the ideal ratios are about 1.38 and 0.60);
//  * the latency-sensitive thread retires 4000 / 200 * 24 = 480 micro-ops,
//    give or take one chain link (24), in every mode: its chain of misses,
//    not the window, limits it;
//  * each thread retires in order and exactly once, and occupancy never
//    exceeds the limit registers.
// The miss latency, miss spacing and phase lengths are this testbench's
// own choices, made to expose the two kinds of thread; the partition sizes
// are the design's defaults.
module tb_stretch_workloads;
  import stretch_pkg::*;

  localparam int ROB = 192, LSQ = 64, W = 6, CW = 6, WBP = 11, AGP = 2;
  localparam int RIW = $clog2(ROB), LIW = $clog2(LSQ);
  localparam int LAT = 200;
  localparam int PHASE = 5000, WARM = 1000;
  localparam int MAX_CYCLES = 20000;

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

  // ---- the two programs ----
  function automatic logic [31:0] mix(input int t, input logic [15:0] tag);
    logic [31:0] x;
    x = {tag, 16'(t * 16'h3c6f + 16'h0b0e)} * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA6B;
    return x ^ (x >> 13);
  endfunction
  function automatic bit f_mem(input int t, input logic [15:0] tag);
    if (t == 0 && tag % 16'd24 == 16'd0) return 1'b0;  // a chain link
    return mix(t, tag)[6:4] == 3'd0;
  endfunction
  // long misses are non-memory micro-ops (e.g. the load's consumer waiting)
  function automatic bit f_miss(input int t, input logic [15:0] tag);
    if (f_mem(t, tag)) return 1'b0;
    return (t == 0) ? (tag % 16'd24 == 16'd0) : (mix(t, tag)[2:0] == 3'd0);
  endfunction

  // ---- model state ----
  logic [15:0] next_fetch [NT];
  logic [15:0] next_commit [NT];
  bit  rob_pend [ROB];
  int  rob_ready [ROB];
  bit  lsq_pend [LSQ];
  int  lsq_rob [LSQ];
  int  chain_ready;        // when thread 0's last miss returns
  int  retired [NT];
  int  ret_phase [3][NT];  // Baseline, B-mode, Q-mode
  int  phase = -1;         // phase being measured, -1 for none

  always @(negedge clk) begin
    if (rst_n) begin
      int nwb, nag;
      for (int t = 0; t < NT; t++) begin
        in_cnt[t] = 3'(W);
        for (int i = 0; i < W; i++) begin
          logic [15:0] tg;
          tg = next_fetch[t] + 16'(i);
          in_uop[t][i] = '{is_mem: f_mem(t, tg), is_store: 1'b0, tag: tg};
        end
      end
      nag = 0;
      for (int p = 0; p < AGP; p++) agu_valid[p] = 1'b0;
      for (int e = 0; e < LSQ && nag < AGP; e++)
        if (lsq_pend[e]) begin
          agu_valid[nag] = 1'b1;
          agu_idx[nag]   = LIW'(e);
          agu_addr[nag]  = 64'(e);
          lsq_pend[e]    = 1'b0;
          rob_pend[lsq_rob[e]]  = 1'b1;
          rob_ready[lsq_rob[e]] = cyc + 1;
          nag++;
        end
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
    int cm_t [NT];
    for (int t = 0; t < NT; t++) begin
      check(rob_usage[t] <= rob_limit[t], "ROB usage above limit");
      check(lsq_usage[t] <= lsq_limit[t], "LSQ usage above limit");
    end
    if (flush_start) begin
      for (int e = 0; e < ROB; e++) rob_pend[e] = 1'b0;
      for (int e = 0; e < LSQ; e++) lsq_pend[e] = 1'b0;
      for (int t = 0; t < NT; t++) next_fetch[t] = next_commit[t];
      chain_ready = cyc;
      return;
    end
    cm_t[0] = 0; cm_t[1] = 0;
    for (int s = 0; s < W; s++)
      if (disp_valid[s]) begin
        int t;
        logic [15:0] tg;
        t  = int'(disp_tid[s]);
        tg = next_fetch[t] + 16'(cm_t[t]);
        cm_t[t]++;
        check(disp_uop[s].tag == tg, "dispatch out of program order");
        if (disp_uop[s].is_mem) begin
          lsq_pend[disp_lsq_idx[s]] = 1'b1;
          lsq_rob[disp_lsq_idx[s]]  = int'(disp_rob_idx[s]);
        end else begin
          rob_pend[disp_rob_idx[s]] = 1'b1;
          if (!f_miss(t, tg))
            rob_ready[disp_rob_idx[s]] = cyc + 1;
          else if (t == 0) begin
            chain_ready = ((chain_ready > cyc) ? chain_ready : cyc) + LAT;
            rob_ready[disp_rob_idx[s]] = chain_ready;
          end else
            rob_ready[disp_rob_idx[s]] = cyc + LAT;
        end
      end
    for (int t = 0; t < NT; t++) next_fetch[t] += 16'(cm_t[t]);
    for (int s = 0; s < CW; s++)
      if (cm_valid[s]) begin
        int t;
        t = int'(cm_tid[s]);
        check(cm_uop[s].tag == next_commit[t], "retired out of order");
        next_commit[t]++;
        retired[t]++;
        if (phase >= 0) ret_phase[phase][t]++;
      end
  endtask

  task automatic write_mode(input bit s, input bit bq);
    @(negedge clk);
    csr_we = 1'b1;
    csr_wdata = {3'd1, 1'b0, bq, s};  // level 1: the main split, thread 0 latency-sensitive
    @(negedge clk);
    csr_we = 1'b0;
  endtask

  task automatic run_phase(input int p);
    int c0;
    c0 = cyc;
    wait (cyc == c0 + WARM);
    phase = p;
    wait (cyc == c0 + PHASE);
    phase = -1;
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    real rb, rq, lb, lq;
    for (int t = 0; t < NT; t++) begin
      next_fetch[t] = '0; next_commit[t] = '0; retired[t] = 0;
      in_cnt[t] = '0;
      for (int i = 0; i < W; i++) in_uop[t][i] = '0;
      for (int p = 0; p < 3; p++) ret_phase[p][t] = 0;
    end
    chain_ready = 0;
    for (int e = 0; e < ROB; e++) begin rob_pend[e] = 1'b0; rob_ready[e] = 0; end
    for (int e = 0; e < LSQ; e++) begin lsq_pend[e] = 1'b0; lsq_rob[e] = 0; end
    for (int p = 0; p < WBP; p++) begin wb_valid[p] = 1'b0; wb_idx[p] = '0; end
    for (int p = 0; p < AGP; p++) begin agu_valid[p] = 1'b0; agu_idx[p] = '0; agu_addr[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_phase(0);                  // Baseline 96-96
    write_mode(1'b1, 1'b0);        // B-mode 56-136
    run_phase(1);
    check(rob_limit[0] == 8'd56 && rob_limit[1] == 8'd136, "B-mode limits");
    write_mode(1'b1, 1'b1);        // Q-mode 136-56
    run_phase(2);
    check(rob_limit[0] == 8'd136 && rob_limit[1] == 8'd56, "Q-mode limits");
    check(flush_count == 16'd2, "two mode changes");

    rb = real'(ret_phase[1][1]) / real'(ret_phase[0][1]);
    rq = real'(ret_phase[2][1]) / real'(ret_phase[0][1]);
    lb = real'(ret_phase[1][0]) / real'(ret_phase[0][0]);
    lq = real'(ret_phase[2][0]) / real'(ret_phase[0][0]);
    $display("retired per %0d cycles, latency-sensitive/batch: Baseline %0d/%0d, B-mode %0d/%0d, Q-mode %0d/%0d",
             PHASE - WARM, ret_phase[0][0], ret_phase[0][1], ret_phase[1][0], ret_phase[1][1],
             ret_phase[2][0], ret_phase[2][1]);
    $display("against Baseline: batch B %0.3f Q %0.3f, latency-sensitive B %0.3f Q %0.3f", rb, rq, lb, lq);
    check(ret_phase[0][0] > 0 && ret_phase[0][1] > 0, "both threads retire in Baseline");
    check(rb >= 1.25, "batch thread gains at least 25% in B-mode");
    check(rq <= 0.75, "batch thread loses at least 25% in Q-mode");
    for (int p = 0; p < 3; p++)
      check(ret_phase[p][0] >= 456 && ret_phase[p][0] <= 504,
            $sformatf("latency-sensitive thread retired %0d, expected 480 +- 24", ret_phase[p][0]));
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
