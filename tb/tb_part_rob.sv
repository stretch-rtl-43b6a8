// tb_part_rob: random allocation, completion and commit on the 192-entry
// partitioned ROB, with occasional flushes that load a new random split.
// The testbench keeps each thread's in-flight micro-ops as a queue and
// checks: allocated entries lie inside the thread's region and are free;
// usage and free room; commit follows round robin (the first thread
// alternates every cycle), retires only the oldest completed micro-ops in
// order, at most 6, with the other thread filling unused slots; memory
// ops retired per thread are counted right.
module tb_part_rob;
  import stretch_pkg::*;

  localparam int N = 192, W = 6, CW = 6, WBP = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       clear = 1'b0, load = 1'b0;
  logic [7:0] limit_in [NT];
  logic [2:0] alloc_n [NT];
  uop_t       alloc_uop [NT][W];
  logic [7:0] alloc_idx [NT][W];
  logic       wb_valid [WBP];
  logic [7:0] wb_idx [WBP];
  logic       commit_en = 1'b0;
  logic       cm_valid [CW], cm_tid [CW];
  logic [7:0] cm_idx [CW];
  uop_t       cm_uop [CW];
  logic [2:0] cm_n [NT], cm_mem_n [NT];
  logic       cm_first;
  logic [7:0] limit [NT], usage [NT], free_n [NT];
  logic       blocked [NT];

  part_rob #(.ENTRIES(N), .W(W), .CW(CW), .WBP(WBP)) dut (.*);

  typedef struct { int idx; logic [15:0] tag; bit mem; bit done; } ent_t;
  ent_t q [NT][$];
  int   m_limit [NT];
  logic [15:0] seq [NT];
  logic rr = 1'b0;
  int checks = 0, failures = 0, n_fill = 0, n_full = 0, n_retired = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      m_limit[t] = N / 2; seq[t] = '0; alloc_n[t] = '0; limit_in[t] = '0;
      for (int i = 0; i < W; i++) alloc_uop[t][i] = '0;
    end
    for (int p = 0; p < WBP; p++) begin wb_valid[p] = 1'b0; wb_idx[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int nwb, exp_n [NT], f, o, budget;
      @(negedge clk);
      clear = 1'b0; load = 1'b0;
      for (int p = 0; p < WBP; p++) wb_valid[p] = 1'b0;
      if ($urandom_range(0, 499) == 0) begin
        int l0;
        clear = 1'b1; load = 1'b1;
        l0 = $urandom_range(8, N - 8);
        limit_in[0] = 8'(l0); limit_in[1] = 8'(N - l0);
        for (int t = 0; t < NT; t++) alloc_n[t] = '0;
        commit_en = 1'b1;
        #1;
        for (int t = 0; t < NT; t++) begin q[t].delete(); m_limit[t] = int'(limit_in[t]); end
        continue;
      end
      commit_en = ($urandom_range(0, 9) != 0);
      for (int t = 0; t < NT; t++) begin
        int room, a;
        room = m_limit[t] - q[t].size();
        a = $urandom_range(0, W);
        if (a > room) a = room;
        alloc_n[t] = 3'(a);
        for (int i = 0; i < W; i++) begin
          alloc_uop[t][i].tag      = seq[t] + 16'(i);
          alloc_uop[t][i].is_mem   = 1'($urandom_range(0, 1));
          alloc_uop[t][i].is_store = 1'b0;
        end
      end
      // complete a few random in-flight entries, favouring thread 1
      nwb = 0;
      for (int t = 0; t < NT; t++)
        foreach (q[t][k])
          if (!q[t][k].done && nwb < WBP && $urandom_range(0, (t == 0) ? 40 : 6) == 0) begin
            wb_valid[nwb] = 1'b1; wb_idx[nwb] = 8'(q[t][k].idx); nwb++;
          end
      #1;
      // state checks
      for (int t = 0; t < NT; t++) begin
        check(int'(usage[t]) == q[t].size(), "usage");
        check(int'(limit[t]) == m_limit[t], "limit");
        check(int'(free_n[t]) == m_limit[t] - q[t].size(), "free room");
        if (blocked[t]) n_full++;
      end
      // expected commit
      f = int'(rr); o = 1 - f; budget = CW;
      foreach (exp_n[t]) exp_n[t] = 0;
      if (commit_en)
        for (int k = 0; k < 2; k++) begin
          int t;
          t = (k == 0) ? f : o;
          while (exp_n[t] < budget && exp_n[t] < q[t].size() && q[t][exp_n[t]].done) exp_n[t]++;
          budget -= exp_n[t];
        end
      check(cm_first == rr, "round-robin first thread");
      for (int t = 0; t < NT; t++) begin
        int mems;
        mems = 0;
        check(int'(cm_n[t]) == exp_n[t], $sformatf("thread %0d retires %0d, expected %0d", t, cm_n[t], exp_n[t]));
        for (int k = 0; k < exp_n[t]; k++) if (q[t][k].mem) mems++;
        check(int'(cm_mem_n[t]) == mems, "memory ops retired");
      end
      if (exp_n[0] > 0 && exp_n[1] > 0) n_fill++;
      for (int s = 0; s < CW; s++) begin
        int t, k;
        t = (s < exp_n[f]) ? f : o;
        k = (s < exp_n[f]) ? s : s - exp_n[f];
        check(cm_valid[s] == (s < exp_n[0] + exp_n[1]), "commit slot valid");
        if (s < exp_n[0] + exp_n[1]) begin
          check(int'(cm_tid[s]) == t, "commit slot thread");
          check(int'(cm_idx[s]) == q[t][k].idx && cm_uop[s].tag == q[t][k].tag, "commit slot entry");
        end
      end
      // allocation targets
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < int'(alloc_n[t]); i++) begin
          int lo;
          lo = (t == 0) ? 0 : m_limit[0];
          check(int'(alloc_idx[t][i]) >= lo && int'(alloc_idx[t][i]) < lo + m_limit[t], "entry outside region");
          foreach (q[t][k]) check(q[t][k].idx != int'(alloc_idx[t][i]) || k < exp_n[t], "entry in use");
        end
      // advance the model to the clock edge
      for (int t = 0; t < NT; t++) begin
        repeat (exp_n[t]) void'(q[t].pop_front());
        n_retired += exp_n[t];
      end
      for (int p = 0; p < WBP; p++)
        if (wb_valid[p])
          for (int t = 0; t < NT; t++) foreach (q[t][k]) if (q[t][k].idx == int'(wb_idx[p])) q[t][k].done = 1;
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < int'(alloc_n[t]); i++)
          q[t].push_back('{idx: int'(alloc_idx[t][i]), tag: alloc_uop[t][i].tag,
                           mem: alloc_uop[t][i].is_mem, done: 1'b0});
        seq[t] += 16'(alloc_n[t]);
      end
      if (commit_en) rr = ~rr;
    end
    check(n_fill > 0 && n_full > 0, "commit fill and full partition seen");
    $display("fill=%0d full=%0d retired=%0d", n_fill, n_full, n_retired);
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
