// part_lsq: load/store queue shared by two hardware threads through
// programmable static partitions, managed alongside the ROB.
//
// Organisation is the same as in part_rob: thread 0 owns entries
// [0, limit[0]), thread 1 owns [limit[0], limit[0]+limit[1]); each region
// is a circular buffer in program order, sized by the thread's
// programmable limit register, with a usage register counting held
// entries (part_limit_ctr). Partitions are reloaded only together with
// `clear`.
//
// Allocation: of the alloc_n[t] micro-ops thread t dispatches this cycle
// (alloc_uop[t][0..]), those with is_mem set take consecutive entries at
// the tail; alloc_idx[t][i] is the entry of micro-op i (meaningful only
// for memory ops), combinational in the same cycle. Each entry records
// load/store, the ROB entry of the micro-op and, once an address port
// writes it (agu_valid/agu_idx/agu_addr), the address. Release: rel_n[t]
// oldest entries of thread t leave at the clock edge, driven by the
// commit of memory ops in the ROB; rel_* shows them in the same cycle so
// that committing stores can be sent to the data cache. The description
// gives the partitioning and the limit/usage registers; the entry
// contents and the interface are this design's choices.
module part_lsq
  import stretch_pkg::*;
#(
  parameter int unsigned ENTRIES     = 64,
  parameter int unsigned W           = 6,   // dispatch width
  parameter int unsigned CW          = 6,   // releases per thread per cycle
  parameter int unsigned AGP         = 2,   // address ports (load/store units)
  parameter int unsigned ADDR_W      = 64,
  parameter int unsigned ROB_IW      = 8,   // width of a ROB entry index
  parameter int unsigned RESET_LIMIT = ENTRIES / 2,
  localparam int unsigned IW  = $clog2(ENTRIES),
  localparam int unsigned LCW = $clog2(ENTRIES + 1),
  localparam int unsigned NW  = $clog2(W + 1),
  localparam int unsigned KW  = $clog2(CW + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              load,
  input  logic [LCW-1:0]    limit_in  [NT],
  input  logic [NW-1:0]     alloc_n   [NT],
  input  uop_t              alloc_uop [NT][W],
  input  logic [ROB_IW-1:0] alloc_rob [NT][W],
  output logic [IW-1:0]     alloc_idx [NT][W],
  output logic [NW-1:0]     alloc_mem [NT],   // entries taken this cycle
  input  logic              agu_valid [AGP],
  input  logic [IW-1:0]     agu_idx   [AGP],
  input  logic [ADDR_W-1:0] agu_addr  [AGP],
  input  logic [KW-1:0]     rel_n     [NT],
  output logic              rel_valid [NT][CW],
  output logic              rel_store [NT][CW],
  output logic [ADDR_W-1:0] rel_addr  [NT][CW],
  output logic [ROB_IW-1:0] rel_rob   [NT][CW],
  output logic [LCW-1:0]    limit   [NT],
  output logic [LCW-1:0]    usage   [NT],
  output logic [LCW-1:0]    free_n  [NT],
  output logic              blocked [NT]
);

  logic              ent_store [ENTRIES];
  logic              ent_av    [ENTRIES];
  logic [ADDR_W-1:0] ent_addr  [ENTRIES];
  logic [ROB_IW-1:0] ent_rob   [ENTRIES];
  logic [IW-1:0]     head_q [NT];
  logic [IW-1:0]     tail_q [NT];
  logic [IW-1:0]     base   [NT];

  for (genvar t = 0; t < NT; t++) begin : g_ctr
    part_limit_ctr #(
      .CAP(ENTRIES), .MAX_ALLOC(W), .MAX_REL(CW), .RESET_LIMIT(RESET_LIMIT)
    ) u_ctr (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (load),
      .limit_in(limit_in[t]),
      .clear   (clear),
      .alloc_n (clear ? '0 : alloc_mem[t]),
      .rel_n   (clear ? '0 : rel_n[t]),
      .limit   (limit[t]),
      .usage   (usage[t]),
      .free_n  (free_n[t]),
      .blocked (blocked[t])
    );
  end

  assign base[0] = '0;
  assign base[1] = IW'(limit[0]);

  function automatic logic [IW-1:0] wrap(input logic [IW-1:0] off, input int unsigned k,
                                         input logic [LCW-1:0] lim);
    int unsigned s;
    s = int'(off) + k;
    if (s >= int'(lim)) s = s - int'(lim);
    return IW'(s);
  endfunction

  always_comb begin
    for (int unsigned t = 0; t < NT; t++) begin
      int unsigned m;
      m = 0;
      for (int unsigned i = 0; i < W; i++) begin
        alloc_idx[t][i] = base[t] + wrap(tail_q[t], m, limit[t]);
        if (i < int'(alloc_n[t]) && alloc_uop[t][i].is_mem) m++;
      end
      alloc_mem[t] = NW'(m);
      for (int unsigned k = 0; k < CW; k++) begin
        logic [IW-1:0] e;
        e = base[t] + wrap(head_q[t], k, limit[t]);
        rel_valid[t][k] = (k < int'(rel_n[t])) && !clear;
        rel_store[t][k] = ent_store[e];
        rel_addr[t][k]  = ent_addr[e];
        rel_rob[t][k]   = ent_rob[e];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++) begin
        head_q[t] <= '0;
        tail_q[t] <= '0;
      end
    end else if (clear) begin
      for (int t = 0; t < NT; t++) begin
        head_q[t] <= '0;
        tail_q[t] <= '0;
      end
    end else begin
      for (int unsigned t = 0; t < NT; t++) begin
        tail_q[t] <= wrap(tail_q[t], int'(alloc_mem[t]), limit[t]);
        head_q[t] <= wrap(head_q[t], int'(rel_n[t]), limit[t]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!clear) begin
      for (int unsigned t = 0; t < NT; t++)
        for (int unsigned i = 0; i < W; i++)
          if (i < int'(alloc_n[t]) && alloc_uop[t][i].is_mem) begin
            ent_store[alloc_idx[t][i]] <= alloc_uop[t][i].is_store;
            ent_rob[alloc_idx[t][i]]   <= alloc_rob[t][i];
            ent_av[alloc_idx[t][i]]    <= 1'b0;
          end
      for (int p = 0; p < AGP; p++)
        if (agu_valid[p]) begin
          ent_addr[agu_idx[p]] <= agu_addr[p];
          ent_av[agu_idx[p]]   <= 1'b1;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && !clear) begin
      assert (int'(limit[0]) + int'(limit[1]) <= ENTRIES)
        else $error("LSQ partitions exceed the LSQ");
      for (int t = 0; t < NT; t++)
        for (int k = 0; k < CW; k++)
          if (rel_valid[t][k])
            assert (ent_av[base[t] + wrap(head_q[t], k, limit[t])])
              else $error("memory op leaves the LSQ without an address");
    end
  end

endmodule
