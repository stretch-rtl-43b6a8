// tb_dispatch_ctl: random offers, free room and in-flight counts for the
// two threads. A reference model in the testbench picks the ICOUNT thread
// (fewer in flight, ties alternating), lets it take micro-ops in order
// until one does not fit in its ROB or LSQ room or the 6 slots are used,
// and lets the other thread fill the remaining slots. Checks take[],
// every slot's thread and position, the full flags, and that nothing is
// dispatched while stalled.
module tb_dispatch_ctl;
  import stretch_pkg::*;

  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       stall = 1'b1;  // held until the first random cycle
  logic [2:0] in_cnt [NT];
  uop_t       in_uop [NT][W];
  logic [7:0] rob_free [NT];
  logic [6:0] lsq_free [NT];
  logic [7:0] icount [NT];
  logic       primary;
  logic [2:0] take [NT];
  logic       slot_valid [W], slot_tid [W];
  logic [2:0] slot_pos [W];
  logic       rob_full [NT], lsq_full [NT];

  dispatch_ctl #(.W(W), .RCW(8), .LCW(7)) dut (.*);

  int checks = 0, failures = 0, n_fill = 0, n_rf = 0, n_lf = 0;
  logic turn = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      in_cnt[t] = '0; rob_free[t] = '0; lsq_free[t] = '0; icount[t] = '0;
      for (int i = 0; i < W; i++) in_uop[t][i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      int p, o, n [NT], budget;
      bit rf [NT], lf [NT];
      @(negedge clk);
      stall = ($urandom_range(0, 19) == 0);
      for (int t = 0; t < NT; t++) begin
        in_cnt[t]   = 3'($urandom_range(0, W));
        rob_free[t] = 8'($urandom_range(0, 8));
        lsq_free[t] = 7'($urandom_range(0, 3));
        icount[t]   = 8'($urandom_range(0, 4));
        for (int i = 0; i < W; i++) begin
          in_uop[t][i].is_mem   = ($urandom_range(0, 2) == 0);
          in_uop[t][i].is_store = 1'($urandom_range(0, 1));
          in_uop[t][i].tag      = 16'($urandom);
        end
      end
      #1;
      // reference
      if (icount[0] < icount[1])      p = 0;
      else if (icount[1] < icount[0]) p = 1;
      else                            p = int'(turn);
      o = 1 - p;
      check(int'(primary) == p, "ICOUNT choice");
      budget = W;
      foreach (n[t]) begin n[t] = 0; rf[t] = 0; lf[t] = 0; end
      if (!stall)
        for (int k = 0; k < 2; k++) begin
          int t, mem;
          t = (k == 0) ? p : o;
          mem = 0;
          while (n[t] < budget && n[t] < int'(in_cnt[t])) begin
            if (n[t] == int'(rob_free[t])) begin rf[t] = 1; break; end
            if (in_uop[t][n[t]].is_mem && mem == int'(lsq_free[t])) begin lf[t] = 1; break; end
            if (in_uop[t][n[t]].is_mem) mem++;
            n[t]++;
          end
          budget = budget - n[t];
        end
      for (int t = 0; t < NT; t++) begin
        check(int'(take[t]) == n[t], $sformatf("thread %0d takes %0d, expected %0d", t, take[t], n[t]));
        check(rob_full[t] == rf[t] && lsq_full[t] == lf[t], "full flags");
        if (rf[t]) n_rf++;
        if (lf[t]) n_lf++;
      end
      if (n[0] > 0 && n[1] > 0) n_fill++;
      for (int s = 0; s < W; s++) begin
        check(slot_valid[s] == (s < n[p] + n[o]), "slot valid");
        if (s < n[p] + n[o]) begin
          check(int'(slot_tid[s]) == ((s < n[p]) ? p : o), "slot thread");
          check(int'(slot_pos[s]) == ((s < n[p]) ? s : s - n[p]), "slot position");
        end
      end
      if (!stall && icount[0] == icount[1]) turn = ~turn;
    end
    check(n_fill > 0 && n_rf > 0 && n_lf > 0, "fill, ROB-full and LSQ-full cases seen");
    $display("fill=%0d rob_full=%0d lsq_full=%0d", n_fill, n_rf, n_lf);
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
