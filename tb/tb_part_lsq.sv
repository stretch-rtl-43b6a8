// tb_part_lsq: random memory ops enter the 64-entry partitioned LSQ, get
// their addresses through the two address ports in random order, and leave
// in program order. Checks that entries lie in the thread's region, that
// usage and limits are right, that the released entries come out oldest
// first with the recorded kind, address and ROB entry, and that flushes
// with a new split empty the queue.
module tb_part_lsq;
  import stretch_pkg::*;

  localparam int N = 64, W = 6, CW = 6, AGP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear = 1'b0, load = 1'b0;
  logic [6:0]  limit_in [NT];
  logic [2:0]  alloc_n [NT];
  uop_t        alloc_uop [NT][W];
  logic [7:0]  alloc_rob [NT][W];
  logic [5:0]  alloc_idx [NT][W];
  logic [2:0]  alloc_mem [NT];
  logic        agu_valid [AGP];
  logic [5:0]  agu_idx [AGP];
  logic [63:0] agu_addr [AGP];
  logic [2:0]  rel_n [NT];
  logic        rel_valid [NT][CW], rel_store [NT][CW];
  logic [63:0] rel_addr [NT][CW];
  logic [7:0]  rel_rob [NT][CW];
  logic [6:0]  limit [NT], usage [NT], free_n [NT];
  logic        blocked [NT];

  part_lsq #(.ENTRIES(N), .W(W), .CW(CW), .AGP(AGP), .ADDR_W(64), .ROB_IW(8)) dut (.*);

  typedef struct { int idx; bit st; logic [7:0] rob; logic [63:0] addr; bit av; } ent_t;
  ent_t q [NT][$];
  int m_limit [NT];
  int checks = 0, failures = 0, n_rel = 0, n_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      m_limit[t] = N / 2; alloc_n[t] = '0; rel_n[t] = '0; limit_in[t] = '0;
      for (int i = 0; i < W; i++) begin alloc_uop[t][i] = '0; alloc_rob[t][i] = '0; end
    end
    for (int p = 0; p < AGP; p++) begin agu_valid[p] = 1'b0; agu_idx[p] = '0; agu_addr[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int nag, m [NT];
      @(negedge clk);
      clear = 1'b0; load = 1'b0;
      for (int p = 0; p < AGP; p++) agu_valid[p] = 1'b0;
      for (int t = 0; t < NT; t++) begin alloc_n[t] = '0; rel_n[t] = '0; end
      if ($urandom_range(0, 499) == 0) begin
        int l0;
        clear = 1'b1; load = 1'b1;
        l0 = $urandom_range(8, N - 8);
        limit_in[0] = 7'(l0); limit_in[1] = 7'(N - l0);
        #1;
        for (int t = 0; t < NT; t++) begin q[t].delete(); m_limit[t] = int'(limit_in[t]); end
        continue;
      end
      for (int t = 0; t < NT; t++) begin
        int room, r;
        room = m_limit[t] - q[t].size();
        m[t] = 0;
        alloc_n[t] = 3'($urandom_range(0, W));
        for (int i = 0; i < W; i++) begin
          alloc_uop[t][i].is_mem   = ($urandom_range(0, 1) == 0);
          alloc_uop[t][i].is_store = 1'($urandom_range(0, 1));
          alloc_uop[t][i].tag      = '0;
          alloc_rob[t][i]          = 8'($urandom);
          if (i < int'(alloc_n[t]) && alloc_uop[t][i].is_mem) begin
            if (m[t] == room) alloc_n[t] = 3'(i);  // dispatch stops at the first op that does not fit
            else m[t]++;
          end
        end
        // release the oldest entries that have their address, slowly
        r = 0;
        if ($urandom_range(0, 2) == 0)
          while (r < CW && r < q[t].size() && q[t][r].av && r < 3) r++;
        rel_n[t] = 3'(r);
      end
      // addresses for random entries without one
      nag = 0;
      for (int t = 0; t < NT; t++)
        foreach (q[t][k])
          if (!q[t][k].av && nag < AGP && $urandom_range(0, 3) == 0) begin
            agu_valid[nag] = 1'b1;
            agu_idx[nag]   = 6'(q[t][k].idx);
            agu_addr[nag]  = {$urandom, $urandom};
            nag++;
          end
      #1;
      for (int t = 0; t < NT; t++) begin
        int mm, lo;
        check(int'(usage[t]) == q[t].size(), "usage");
        check(int'(limit[t]) == m_limit[t], "limit");
        check(int'(free_n[t]) == m_limit[t] - q[t].size(), "free room");
        if (blocked[t]) n_full++;
        check(int'(alloc_mem[t]) == m[t], "entries taken");
        for (int k = 0; k < CW; k++) begin
          check(rel_valid[t][k] == (k < int'(rel_n[t])), "release valid");
          if (k < int'(rel_n[t])) begin
            check(rel_store[t][k] == q[t][k].st && rel_addr[t][k] == q[t][k].addr &&
                  rel_rob[t][k] == q[t][k].rob, "released entry contents");
            n_rel++;
          end
        end
        // allocation targets, then advance the model
        lo = (t == 0) ? 0 : m_limit[0];
        mm = 0;
        repeat (int'(rel_n[t])) void'(q[t].pop_front());
        for (int i = 0; i < int'(alloc_n[t]); i++)
          if (alloc_uop[t][i].is_mem) begin
            check(int'(alloc_idx[t][i]) >= lo && int'(alloc_idx[t][i]) < lo + m_limit[t], "entry outside region");
            foreach (q[t][k]) check(q[t][k].idx != int'(alloc_idx[t][i]), "entry in use");
            q[t].push_back('{idx: int'(alloc_idx[t][i]), st: alloc_uop[t][i].is_store,
                             rob: alloc_rob[t][i], addr: '0, av: 1'b0});
            mm++;
          end
      end
      for (int p = 0; p < AGP; p++)
        if (agu_valid[p])
          for (int t = 0; t < NT; t++)
            foreach (q[t][k]) if (q[t][k].idx == int'(agu_idx[p])) begin
              q[t][k].addr = agu_addr[p]; q[t][k].av = 1'b1;
            end
    end
    check(n_rel > 0 && n_full > 0, "releases and full partition seen");
    $display("released=%0d full=%0d", n_rel, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
