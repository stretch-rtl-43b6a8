// tb_stretch_ctrl_reg: writes every value of the Stretch control register
// into a core with Q-mode and one without, and checks the read-back and
// the decoded configuration against rules worked out by hand: S=0 ->
// Baseline with LS_TID and LEVEL reported as 0; S=1,B/Q=0 -> B-mode;
// S=1,B/Q=1 -> Q-mode (Baseline without Q-mode); LEVEL above the 5
// provisioned levels saturates at 4.
module tb_stretch_ctrl_reg;
  import stretch_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       wr_en = 1'b0;
  logic [5:0] wr_data = '0;
  logic [5:0] rd_q, rd_nq;
  cfg_t       cfg_q, cfg_nq;

  stretch_ctrl_reg #(.HAS_QMODE(1'b1), .N_LEVELS(5)) dut_q  (.clk, .rst_n, .wr_en, .wr_data, .rd_data(rd_q),  .cfg_o(cfg_q));
  stretch_ctrl_reg #(.HAS_QMODE(1'b0), .N_LEVELS(5)) dut_nq (.clk, .rst_n, .wr_en, .wr_data, .rd_data(rd_nq), .cfg_o(cfg_nq));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // expected decode for the low three bits {ls, bq, s}
  mode_e exp_mode_q  [8] = '{MODE_BASE, MODE_B, MODE_BASE, MODE_Q, MODE_BASE, MODE_B, MODE_BASE, MODE_Q};
  mode_e exp_mode_nq [8] = '{MODE_BASE, MODE_B, MODE_BASE, MODE_BASE, MODE_BASE, MODE_B, MODE_BASE, MODE_BASE};
  logic  exp_ls      [8] = '{0, 0, 0, 0, 0, 1, 0, 1};
  int    exp_lvl     [8] = '{0, 1, 2, 3, 4, 4, 4, 4};

  initial begin
    repeat (2) @(negedge clk);
    check(rd_q == '0 && cfg_q.mode == MODE_BASE, "reset value");
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 64; v++) begin
        int k, low, lv;
        cfg_t eq, enq;
        k = r ? 63 - v : v;
        low = k % 8;
        lv = k / 8;
        eq  = '{mode: exp_mode_q[low], ls_tid: exp_ls[low], level: 3'(exp_lvl[lv])};
        enq = '{mode: exp_mode_nq[low], ls_tid: exp_ls[low], level: 3'(exp_lvl[lv])};
        if (eq.mode == MODE_BASE)  begin eq.ls_tid = 1'b0;  eq.level = '0;  end
        if (enq.mode == MODE_BASE) begin enq.ls_tid = 1'b0; enq.level = '0; end
        @(negedge clk);
        wr_en = 1'b1; wr_data = 6'(k);
        @(negedge clk);
        wr_en = 1'b0; wr_data = ~6'(k);
        @(negedge clk);  // no write: value holds
        check(rd_q == 6'(k) && rd_nq == 6'(k), $sformatf("read-back of %0d", k));
        check(cfg_q == eq, $sformatf("decode of %0d with Q-mode", k));
        check(cfg_nq == enq, $sformatf("decode of %0d without Q-mode", k));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
