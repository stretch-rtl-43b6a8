// tb_icount_sel: random in-flight counts; checks that the thread with the
// fewer instructions in flight is chosen and that ties alternate between
// the threads.
module tb_icount_sel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       advance = 1'b0;
  logic [7:0] icount [2];
  logic       sel;

  icount_sel #(.CW(8)) dut (.*);

  int checks = 0, failures = 0, ties = 0;
  logic last_tie_sel = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    icount[0] = '0; icount[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      advance = 1'b1;
      icount[0] = 8'($urandom_range(0, 12));
      icount[1] = ($urandom_range(0, 3) == 0) ? icount[0] : 8'($urandom_range(0, 12));
      #1;
      if (icount[0] < icount[1])      check(sel == 1'b0, "thread 0 has fewer in flight");
      else if (icount[1] < icount[0]) check(sel == 1'b1, "thread 1 has fewer in flight");
      else begin
        check(sel != last_tie_sel, "ties alternate");
        last_tie_sel = sel;
        ties++;
      end
    end
    check(ties > 10, "ties happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
