// tb_part_limit_ctr: drives random legal allocations and releases into a
// 192-entry limit/usage pair, reloading the limit with a flush now and
// then, and checks usage, free room and the blocked flag every cycle
// against a counter kept in the testbench. It also checks that the
// blocked condition (usage equal to the limit) is reached.
module tb_part_limit_ctr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load = 1'b0, clear = 1'b0;
  logic [7:0] limit_in = '0;
  logic [2:0] alloc_n = '0, rel_n = '0;
  logic [7:0] limit, usage, free_n;
  logic       blocked;

  part_limit_ctr #(.CAP(192), .MAX_ALLOC(6), .MAX_REL(6), .RESET_LIMIT(96)) dut (.*);

  int checks = 0, failures = 0, n_blocked = 0;
  int m_usage = 0, m_limit = 96;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // observe the state left by the last edge
      check(int'(usage) == m_usage, $sformatf("usage %0d, expected %0d", usage, m_usage));
      check(int'(limit) == m_limit, "limit");
      check(int'(free_n) == m_limit - m_usage, "free room");
      check(blocked == (m_usage == m_limit), "blocked flag");
      if (blocked) n_blocked++;
      // next cycle's inputs
      load = 1'b0; clear = 1'b0; alloc_n = '0; rel_n = '0;
      if ($urandom_range(0, 299) == 0) begin
        load = 1'b1; clear = 1'b1;
        limit_in = 8'($urandom_range(6, 186));
        m_limit = int'(limit_in);
        m_usage = 0;
      end else begin
        int a, r;
        a = $urandom_range(0, 6);
        if (a > m_limit - m_usage) a = m_limit - m_usage;
        // drain slowly so the partition fills up
        r = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 6) : 0;
        if (r > m_usage) r = m_usage;
        alloc_n = 3'(a); rel_n = 3'(r);
        m_usage = m_usage + a - r;
      end
    end
    check(n_blocked > 0, "partition never reached its limit");
    $display("blocked cycles: %0d", n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
