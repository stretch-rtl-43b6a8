// tb_mode_flush_ctl: requests configuration changes and checks that each
// change (of mode, latency-sensitive thread or level) gives one
// flush_start pulse, that flushing lasts exactly 12 cycles, that the new
// configuration is in force after the pulse, that an unchanged request
// causes no flush, and that a request changed during a flush is taken up
// right after it.
module tb_mode_flush_ctl;
  import stretch_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t        cfg_req = '{mode: MODE_BASE, ls_tid: 1'b0, level: 3'd0};
  cfg_t        cfg_cur;
  logic        flush_start, flushing;
  logic [15:0] flush_count;

  mode_flush_ctl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sets a new request and measures the flush it causes.
  task automatic change(input cfg_t c, input bit expect_flush);
    int len, starts;
    @(negedge clk);
    cfg_req = c;
    #1;
    len = 0; starts = 0;
    while (flushing || (len == 0 && starts == 0 && flush_start)) begin
      if (flush_start) starts++;
      len++;
      @(negedge clk); #1;
      if (len > 100) break;
    end
    if (expect_flush) begin
      check(starts == 1, $sformatf("%0d flush pulses", starts));
      check(len == 12, $sformatf("flush of %0d cycles", len));
    end else begin
      check(len == 0 && starts == 0, "flush without a change");
    end
    check(cfg_cur == c, "configuration in force");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    change('{mode: MODE_BASE, ls_tid: 1'b0, level: 3'd0}, 1'b0);
    change('{mode: MODE_B, ls_tid: 1'b0, level: 3'd1}, 1'b1);
    change('{mode: MODE_B, ls_tid: 1'b0, level: 3'd1}, 1'b0);
    change('{mode: MODE_B, ls_tid: 1'b1, level: 3'd1}, 1'b1);
    change('{mode: MODE_B, ls_tid: 1'b1, level: 3'd3}, 1'b1);
    change('{mode: MODE_Q, ls_tid: 1'b1, level: 3'd1}, 1'b1);
    change('{mode: MODE_BASE, ls_tid: 1'b0, level: 3'd0}, 1'b1);
    check(flush_count == 16'd5, "flush count");
    // a request changed during a flush starts a second flush afterwards
    @(negedge clk);
    cfg_req = '{mode: MODE_B, ls_tid: 1'b0, level: 3'd1};
    repeat (5) @(negedge clk);
    cfg_req = '{mode: MODE_Q, ls_tid: 1'b0, level: 3'd1};
    #1;
    check(flushing && !flush_start, "second request waits");
    repeat (7) @(negedge clk);
    #1;
    check(flush_start && cfg_cur.mode == MODE_B, "second flush starts when the first ends");
    repeat (12) @(negedge clk);
    #1;
    check(!flushing && cfg_cur.mode == MODE_Q && flush_count == 16'd7, "second flush done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
