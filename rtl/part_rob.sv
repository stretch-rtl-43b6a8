// part_rob: reorder buffer shared by two hardware threads through
// programmable static partitions.
//
// The ENTRIES entries are split in two contiguous regions: thread 0 owns
// entries [0, limit[0]) and thread 1 owns [limit[0], limit[0]+limit[1]).
// Each region is a circular buffer with its own head and tail, kept as
// offsets into the region. The size of each region is the thread's limit
// register (part_limit_ctr); its usage register counts the entries the
// thread holds, and a thread whose usage has reached its limit is blocked.
// A new partitioning is only loaded together with `clear` (the flush that
// accompanies every mode change), so the regions can be moved while the
// ROB is empty. The static partitions with per-thread limit and usage
// registers follow the design description; placing the regions as two
// contiguous ranges is this design's choice.
//
// Allocation: alloc_n[t] entries are written at the tail of thread t's
// region from alloc_uop[t][0..alloc_n-1]; alloc_idx[t][i] gives the entry
// index the i-th micro-op will occupy (combinational, valid in the same
// cycle). Completion: a high wb_valid[p] marks entry wb_idx[p] done.
// Commit: when commit_en is high, a round-robin pointer that advances every
// cycle names the thread that commits first; it retires its oldest done
// entries, in order, up to CW; if it retires fewer than CW the other thread
// retires from its own head in the remaining slots. Round-robin commit and
// the fill by the other thread follow the description; advancing the
// pointer every cycle is this design's choice. Commit outputs
// (cm_*) are combinational and describe the retirement happening at the
// next clock edge. A micro-op allocated or completed in cycle c can retire
// in cycle c+1 at the earliest.
module part_rob
  import stretch_pkg::*;
#(
  parameter int unsigned ENTRIES     = 192,
  parameter int unsigned W           = 6,   // dispatch width
  parameter int unsigned CW          = 6,   // commit width
  parameter int unsigned WBP         = 11,  // completion ports
  parameter int unsigned RESET_LIMIT = ENTRIES / 2,
  localparam int unsigned IW  = $clog2(ENTRIES),
  localparam int unsigned RCW = $clog2(ENTRIES + 1),
  localparam int unsigned NW  = $clog2(W + 1),
  localparam int unsigned KW  = $clog2(CW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // flush and partitioning
  input  logic           clear,
  input  logic           load,
  input  logic [RCW-1:0] limit_in  [NT],
  // allocation
  input  logic [NW-1:0]  alloc_n   [NT],
  input  uop_t           alloc_uop [NT][W],
  output logic [IW-1:0]  alloc_idx [NT][W],
  // completion
  input  logic           wb_valid  [WBP],
  input  logic [IW-1:0]  wb_idx    [WBP],
  // commit
  input  logic           commit_en,
  output logic           cm_valid    [CW],
  output logic           cm_tid      [CW],
  output logic [IW-1:0]  cm_idx      [CW],
  output uop_t           cm_uop      [CW],
  output logic [KW-1:0]  cm_n        [NT],
  output logic [KW-1:0]  cm_mem_n    [NT],
  output logic           cm_first,   // thread given commit priority
  // partition state
  output logic [RCW-1:0] limit   [NT],
  output logic [RCW-1:0] usage   [NT],
  output logic [RCW-1:0] free_n  [NT],
  output logic           blocked [NT]
);

  uop_t           ent_uop  [ENTRIES];
  logic           ent_done [ENTRIES];
  logic [IW-1:0]  head_q [NT];
  logic [IW-1:0]  tail_q [NT];
  logic [IW-1:0]  base   [NT];
  logic           rr_q;

  for (genvar t = 0; t < NT; t++) begin : g_ctr
    part_limit_ctr #(
      .CAP(ENTRIES), .MAX_ALLOC(W), .MAX_REL(CW), .RESET_LIMIT(RESET_LIMIT)
    ) u_ctr (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (load),
      .limit_in(limit_in[t]),
      .clear   (clear),
      .alloc_n (clear ? '0 : alloc_n[t]),
      .rel_n   (cm_n[t]),
      .limit   (limit[t]),
      .usage   (usage[t]),
      .free_n  (free_n[t]),
      .blocked (blocked[t])
    );
  end

  assign base[0] = '0;
  assign base[1] = IW'(limit[0]);

  // Offset `off` advanced by k within a region of `lim` entries.
  function automatic logic [IW-1:0] wrap(input logic [IW-1:0] off, input int unsigned k,
                                         input logic [RCW-1:0] lim);
    int unsigned s;
    s = int'(off) + k;
    if (s >= int'(lim)) s = s - int'(lim);
    return IW'(s);
  endfunction

  function automatic logic [IW-1:0] phys(input int unsigned t, input logic [IW-1:0] off);
    return base[t] + off;
  endfunction

  // Leading done entries of thread t, at most `budget`.
  function automatic int unsigned ready_run(input int unsigned t, input int unsigned budget);
    int unsigned n;
    logic stop;
    n = 0; stop = 1'b0;
    for (int unsigned i = 0; i < CW; i++) begin
      if (!stop) begin
        if (i >= budget || i >= int'(usage[t]) ||
            !ent_done[phys(t, wrap(head_q[t], i, limit[t]))]) stop = 1'b1;
        else n++;
      end
    end
    return n;
  endfunction

  always_comb begin
    for (int unsigned t = 0; t < NT; t++)
      for (int unsigned i = 0; i < W; i++)
        alloc_idx[t][i] = phys(t, wrap(tail_q[t], i, limit[t]));
  end

  // Commit selection.
  always_comb begin
    int unsigned f, o, nf, no;
    f = rr_q ? 1 : 0;
    o = 1 - f;
    nf = 0; no = 0;
    if (commit_en && !clear) begin
      nf = ready_run(f, CW);
      no = ready_run(o, CW - nf);
    end
    cm_first = rr_q;
    cm_n[f]  = KW'(nf);
    cm_n[o]  = KW'(no);
    cm_mem_n[0] = '0;
    cm_mem_n[1] = '0;
    for (int unsigned s = 0; s < CW; s++) begin
      int unsigned t, k;
      t = (s < nf) ? f : o;
      k = (s < nf) ? s : s - nf;
      cm_valid[s] = (s < nf + no);
      cm_tid[s]   = 1'(t);
      cm_idx[s]   = phys(t, wrap(head_q[t], k, limit[t]));
      cm_uop[s]   = ent_uop[cm_idx[s]];
      if (cm_valid[s] && cm_uop[s].is_mem) cm_mem_n[t] = cm_mem_n[t] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++) begin
        head_q[t] <= '0;
        tail_q[t] <= '0;
      end
      rr_q <= 1'b0;
    end else if (clear) begin
      for (int t = 0; t < NT; t++) begin
        head_q[t] <= '0;
        tail_q[t] <= '0;
      end
    end else begin
      for (int unsigned t = 0; t < NT; t++) begin
        tail_q[t] <= wrap(tail_q[t], int'(alloc_n[t]), limit[t]);
        head_q[t] <= wrap(head_q[t], int'(cm_n[t]), limit[t]);
      end
      if (commit_en) rr_q <= ~rr_q;
    end
  end

  // Entry storage (not reset: an entry is only read after allocation).
  always_ff @(posedge clk) begin
    if (!clear) begin
      for (int unsigned t = 0; t < NT; t++)
        for (int unsigned i = 0; i < W; i++)
          if (i < int'(alloc_n[t])) begin
            ent_uop[alloc_idx[t][i]]  <= alloc_uop[t][i];
            ent_done[alloc_idx[t][i]] <= 1'b0;
          end
      for (int p = 0; p < WBP; p++)
        if (wb_valid[p]) ent_done[wb_idx[p]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(limit[0]) + int'(limit[1]) <= ENTRIES)
        else $error("ROB partitions exceed the ROB");
      assert (int'(limit[0]) >= W && int'(limit[1]) >= W)
        else $error("ROB partition smaller than the dispatch width");
    end
  end

endmodule
