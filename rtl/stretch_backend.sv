// stretch_backend: the instruction-window back-end of a two-thread SMT core
// with Stretch partitioning.
//
// Stretch shares the reorder buffer (ROB) and load/store queue (LSQ) of an
// SMT core between its two hardware threads by static partitions whose
// sizes are programmable. System software chooses, through a control
// register, between equal halves (Baseline), batch-boost splits that
// leave the latency-sensitive thread a small share (B-mode; five splits
// provisioned by default, 64-128 to 32-160 ROB entries, 56-136 being the
// main one) and QoS-boost splits that give it the large share (Q-mode,
// 128-64 to 160-32). Every change of configuration flushes both threads
// for 12 cycles, empties both structures and reloads their limit
// registers.
//
// Blocks: stretch_ctrl_reg (control register), stretch_config_table
// (design-time configurations), mode_flush_ctl (flush on mode change),
// dispatch_ctl with icount_sel (6-wide dispatch; ICOUNT picks the thread
// with fewer instructions in flight, the other thread fills unused slots),
// part_rob (192-entry ROB, round-robin 6-wide commit) and part_lsq
// (64-entry LSQ). Both partitioned structures hold a limit and a usage
// register per thread (part_limit_ctr).
//
// Interface and timing:
//  * csr_we/csr_wdata write {LEVEL[2:0], LS_TID, B/Q, S}; the flush starts in the
//    following cycle if the decoded configuration changed.
//  * Each thread offers up to W micro-ops per cycle (in_cnt, in_uop, in
//    program order); in_take[t] says how many were dispatched this cycle.
//    Slot s of the dispatch group is described by disp_* (thread, micro-op,
//    ROB entry, LSQ entry), all combinational.
//  * The execution units report completions by ROB entry (wb_valid/wb_idx)
//    and memory addresses by LSQ entry (agu_*), both registered.
//  * Retirement is reported on cm_* and, for memory ops, on lsq_rel_*
//    (combinational, effective at the next edge).
//  * After a flush (flush_start) every in-flight micro-op of both threads is
//    gone; the front end refetches from the oldest micro-op not retired.
// The fetch unit, caches, branch predictors and execution units are outside
// this module.
module stretch_backend
  import stretch_pkg::*;
#(
  parameter int unsigned ROB_ENTRIES  = 192,
  parameter int unsigned LSQ_ENTRIES  = 64,
  parameter int unsigned W            = 6,    // dispatch width
  parameter int unsigned CW           = 6,    // commit width
  parameter int unsigned WBP          = 11,   // completion ports (one per FU)
  parameter int unsigned AGP          = 2,    // load/store units
  parameter int unsigned ADDR_W       = 64,
  parameter int unsigned FLUSH_CYCLES = 12,
  parameter int unsigned N_LEVELS     = 5,    // provisioned splits per boosted mode
  parameter int unsigned ROB_LS_B [N_LEVELS] = '{64, 56, 48, 40, 32},
  parameter int unsigned ROB_LS_Q [N_LEVELS] = '{128, 136, 144, 152, 160},
  parameter bit          HAS_QMODE    = 1'b1,
  localparam int unsigned RIW = $clog2(ROB_ENTRIES),
  localparam int unsigned LIW = $clog2(LSQ_ENTRIES),
  localparam int unsigned RCW = $clog2(ROB_ENTRIES + 1),
  localparam int unsigned LCW = $clog2(LSQ_ENTRIES + 1),
  localparam int unsigned NW  = $clog2(W + 1),
  localparam int unsigned KW  = $clog2(CW + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control register
  input  logic              csr_we,
  input  logic [LVL_W+2:0]  csr_wdata,
  output logic [LVL_W+2:0]  csr_rdata,
  // micro-ops offered by the front end
  input  logic [NW-1:0]     in_cnt  [NT],
  input  uop_t              in_uop  [NT][W],
  output logic [NW-1:0]     in_take [NT],
  // dispatch group
  output logic              disp_valid   [W],
  output logic              disp_tid     [W],
  output uop_t              disp_uop     [W],
  output logic [RIW-1:0]    disp_rob_idx [W],
  output logic [LIW-1:0]    disp_lsq_idx [W],
  // completion and addresses
  input  logic              wb_valid  [WBP],
  input  logic [RIW-1:0]    wb_idx    [WBP],
  input  logic              agu_valid [AGP],
  input  logic [LIW-1:0]    agu_idx   [AGP],
  input  logic [ADDR_W-1:0] agu_addr  [AGP],
  // retirement
  output logic              cm_valid [CW],
  output logic              cm_tid   [CW],
  output uop_t              cm_uop   [CW],
  output logic [RIW-1:0]    cm_idx   [CW],
  output logic              lsq_rel_valid [NT][CW],
  output logic              lsq_rel_store [NT][CW],
  output logic [ADDR_W-1:0] lsq_rel_addr  [NT][CW],
  // status
  output cfg_t              cfg_cur,
  output logic              flush_start,
  output logic              flushing,
  output logic [15:0]       flush_count,
  output logic              icount_primary,
  output logic              rob_full  [NT],
  output logic              lsq_full  [NT],
  output logic [RCW-1:0]    rob_limit [NT],
  output logic [RCW-1:0]    rob_usage [NT],
  output logic [LCW-1:0]    lsq_limit [NT],
  output logic [LCW-1:0]    lsq_usage [NT]
);

  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1;

  cfg_t           cfg_req;
  logic [RCW-1:0] rob_limit_new [NT];
  logic [LCW-1:0] lsq_limit_new [NT];
  logic [RCW-1:0] rob_free [NT];
  logic [LCW-1:0] lsq_free [NT];
  logic           rob_blocked [NT];
  logic           lsq_blocked [NT];
  logic [RIW-1:0] rob_alloc_idx [NT][W];
  logic [LIW-1:0] lsq_alloc_idx [NT][W];
  logic [NW-1:0]  lsq_alloc_mem [NT];
  logic [KW-1:0]  cm_n     [NT];
  logic [KW-1:0]  cm_mem_n [NT];
  logic           slot_tid [W];
  logic [PW-1:0]  slot_pos [W];
  logic [RIW-1:0] lsq_rel_rob [NT][CW];

  stretch_ctrl_reg #(.HAS_QMODE(HAS_QMODE), .N_LEVELS(N_LEVELS)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (csr_we),
    .wr_data(csr_wdata),
    .rd_data(csr_rdata),
    .cfg_o  (cfg_req)
  );

  stretch_config_table #(
    .ROB_ENTRIES(ROB_ENTRIES), .LSQ_ENTRIES(LSQ_ENTRIES),
    .N_LEVELS(N_LEVELS), .ROB_LS_B(ROB_LS_B), .ROB_LS_Q(ROB_LS_Q)
  ) u_cfg (
    .cfg_i    (cfg_req),
    .rob_limit(rob_limit_new),
    .lsq_limit(lsq_limit_new)
  );

  mode_flush_ctl #(.FLUSH_CYCLES(FLUSH_CYCLES)) u_flush (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_req    (cfg_req),
    .cfg_cur    (cfg_cur),
    .flush_start(flush_start),
    .flushing   (flushing),
    .flush_count(flush_count)
  );

  dispatch_ctl #(.W(W), .RCW(RCW), .LCW(LCW)) u_disp (
    .clk       (clk),
    .rst_n     (rst_n),
    .stall     (flushing),
    .in_cnt    (in_cnt),
    .in_uop    (in_uop),
    .rob_free  (rob_free),
    .lsq_free  (lsq_free),
    .icount    (rob_usage),
    .primary   (icount_primary),
    .take      (in_take),
    .slot_valid(disp_valid),
    .slot_tid  (slot_tid),
    .slot_pos  (slot_pos),
    .rob_full  (rob_full),
    .lsq_full  (lsq_full)
  );

  part_rob #(
    .ENTRIES(ROB_ENTRIES), .W(W), .CW(CW), .WBP(WBP)
  ) u_rob (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (flush_start),
    .load     (flush_start),
    .limit_in (rob_limit_new),
    .alloc_n  (in_take),
    .alloc_uop(in_uop),
    .alloc_idx(rob_alloc_idx),
    .wb_valid (wb_valid),
    .wb_idx   (wb_idx),
    .commit_en(!flushing),
    .cm_valid (cm_valid),
    .cm_tid   (cm_tid),
    .cm_idx   (cm_idx),
    .cm_uop   (cm_uop),
    .cm_n     (cm_n),
    .cm_mem_n (cm_mem_n),
    .cm_first (),
    .limit    (rob_limit),
    .usage    (rob_usage),
    .free_n   (rob_free),
    .blocked  (rob_blocked)
  );

  part_lsq #(
    .ENTRIES(LSQ_ENTRIES), .W(W), .CW(CW), .AGP(AGP), .ADDR_W(ADDR_W), .ROB_IW(RIW)
  ) u_lsq (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (flush_start),
    .load     (flush_start),
    .limit_in (lsq_limit_new),
    .alloc_n  (in_take),
    .alloc_uop(in_uop),
    .alloc_rob(rob_alloc_idx),
    .alloc_idx(lsq_alloc_idx),
    .alloc_mem(lsq_alloc_mem),
    .agu_valid(agu_valid),
    .agu_idx  (agu_idx),
    .agu_addr (agu_addr),
    .rel_n    (cm_mem_n),
    .rel_valid(lsq_rel_valid),
    .rel_store(lsq_rel_store),
    .rel_addr (lsq_rel_addr),
    .rel_rob  (lsq_rel_rob),
    .limit    (lsq_limit),
    .usage    (lsq_usage),
    .free_n   (lsq_free),
    .blocked  (lsq_blocked)
  );

  always_comb begin
    for (int unsigned s = 0; s < W; s++) begin
      disp_tid[s]     = slot_tid[s];
      disp_uop[s]     = in_uop[slot_tid[s]][slot_pos[s]];
      disp_rob_idx[s] = rob_alloc_idx[slot_tid[s]][slot_pos[s]];
      disp_lsq_idx[s] = lsq_alloc_idx[slot_tid[s]][slot_pos[s]];
    end
  end

  // A retiring memory op leaves the LSQ together with its ROB entry.
  always_ff @(posedge clk) begin
    if (rst_n && !flushing) begin
      for (int t = 0; t < NT; t++)
        for (int k = 0; k < CW; k++)
          if (lsq_rel_valid[t][k]) begin
            automatic int unsigned j = 0;
            automatic logic seen = 1'b0;
            for (int s = 0; s < CW; s++)
              if (cm_valid[s] && cm_tid[s] == 1'(t) && cm_uop[s].is_mem) begin
                if (j == k) seen = (cm_idx[s] == lsq_rel_rob[t][k]);
                j++;
              end
            assert (seen) else $error("LSQ and ROB retire different memory ops");
          end
      for (int t = 0; t < NT; t++)
        assert (!(rob_blocked[t] && in_take[t] != '0) && !(lsq_blocked[t] && lsq_alloc_mem[t] != '0))
          else $error("dispatch into a full partition");
    end
  end

endmodule
