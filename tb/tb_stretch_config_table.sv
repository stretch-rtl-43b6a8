// tb_stretch_config_table: checks the ROB and LSQ limits of every
// configuration against numbers worked out by hand: Baseline 96/96 and
// 32/32; B-mode levels 0-4 give the latency-sensitive thread 64, 56, 48,
// 40, 32 ROB entries and 21, 19, 16, 13, 11 LSQ entries (LSQ share =
// ROB share / 3, rounded), the other thread the rest; Q-mode levels give
// it 128, 136, 144, 152, 160 and 43, 45, 48, 51, 53; levels 5-7 act as
// level 4; either thread may be the latency-sensitive one. A second
// instance is the minimal build with one B-mode split (56-136) and one
// Q-mode split (136-56): every level must select those.
module tb_stretch_config_table;
  import stretch_pkg::*;

  cfg_t       cfg;
  logic [7:0] rob_limit [NT];
  logic [6:0] lsq_limit [NT];

  logic [7:0] rob_min [NT];
  logic [6:0] lsq_min [NT];

  stretch_config_table dut (.cfg_i(cfg), .rob_limit, .lsq_limit);
  stretch_config_table #(.N_LEVELS(1), .ROB_LS_B('{default: 56}), .ROB_LS_Q('{default: 136}))
    dut_min (.cfg_i(cfg), .rob_limit(rob_min), .lsq_limit(lsq_min));

  int rob_b [5] = '{64, 56, 48, 40, 32};
  int lsq_b [5] = '{21, 19, 16, 13, 11};
  int rob_q [5] = '{128, 136, 144, 152, 160};
  int lsq_q [5] = '{43, 45, 48, 51, 53};

  int checks = 0, failures = 0;
  task automatic expect_limits(input mode_e m, input logic ls, input int lvl,
                               input int r_ls, input int l_ls);
    int r0, r1, l0, l1;
    cfg = '{mode: m, ls_tid: ls, level: 3'(lvl)};
    r0 = ls ? 192 - r_ls : r_ls;  r1 = 192 - r0;
    l0 = ls ? 64 - l_ls : l_ls;   l1 = 64 - l0;
    #1;
    checks++;
    if (rob_limit[0] != 8'(r0) || rob_limit[1] != 8'(r1) ||
        lsq_limit[0] != 7'(l0) || lsq_limit[1] != 7'(l1)) begin
      failures++;
      $display("FAIL: mode %s ls %0d level %0d: ROB %0d/%0d LSQ %0d/%0d", m.name(), ls, lvl,
               rob_limit[0], rob_limit[1], lsq_limit[0], lsq_limit[1]);
    end
  endtask

  // Minimal build: the level field is ignored.
  task automatic expect_min(input mode_e m, input logic ls, input int lvl,
                            input int r_ls, input int l_ls);
    int r0, l0;
    cfg = '{mode: m, ls_tid: ls, level: 3'(lvl)};
    r0 = ls ? 192 - r_ls : r_ls;
    l0 = ls ? 64 - l_ls : l_ls;
    #1;
    checks++;
    if (rob_min[0] != 8'(r0) || rob_min[1] != 8'(192 - r0) ||
        lsq_min[0] != 7'(l0) || lsq_min[1] != 7'(64 - l0)) begin
      failures++;
      $display("FAIL: minimal build, mode %s ls %0d level %0d: ROB %0d/%0d LSQ %0d/%0d",
               m.name(), ls, lvl, rob_min[0], rob_min[1], lsq_min[0], lsq_min[1]);
    end
  endtask

  initial begin
    for (int ls = 0; ls < 2; ls++) begin
      expect_limits(MODE_BASE, 1'(ls), 0, 96, 32);
      for (int k = 0; k < 8; k++) begin
        int e;
        e = (k > 4) ? 4 : k;
        expect_limits(MODE_B, 1'(ls), k, rob_b[e], lsq_b[e]);
        expect_limits(MODE_Q, 1'(ls), k, rob_q[e], lsq_q[e]);
        expect_min(MODE_B, 1'(ls), k, 56, 19);
        expect_min(MODE_Q, 1'(ls), k, 136, 45);
      end
      expect_min(MODE_BASE, 1'(ls), 0, 96, 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
