// stretch_config_table: the design-time partition configurations.
//
// Maps the configuration requested through the control register to the
// values loaded into the limit registers of the ROB and LSQ, per hardware
// thread. Baseline splits each structure in two equal halves. B-mode level
// k gives the latency-sensitive thread ROB_LS_B[k] ROB entries and the
// other thread the rest; Q-mode level k gives the latency-sensitive thread
// ROB_LS_Q[k]. The defaults are the splits evaluated for the design:
// B-mode 64-128, 56-136, 48-144, 40-152, 32-160 (the batch thread's share
// growing from 128 to 160 in steps of 8; 56-136 is the main one) and
// Q-mode 128-64, 136-56, 144-48, 152-40, 160-32.
//
// The LSQ is managed in proportion to the ROB. Its per-thread share is
// computed here as round(LSQ_ENTRIES * rob_share / ROB_ENTRIES), e.g.
// 19/45 for 56/136; the rounding is this design's choice.
//
// Purely combinational; the limits are only sampled when the flush
// controller loads them. Levels beyond N_LEVELS select level N_LEVELS-1.
// A product that provisions only two or three configurations sets
// N_LEVELS = 1, e.g. ROB_LS_B = '{default: 56}, ROB_LS_Q = '{default: 136}.
module stretch_config_table
  import stretch_pkg::*;
#(
  parameter int unsigned ROB_ENTRIES = 192,
  parameter int unsigned LSQ_ENTRIES = 64,
  parameter int unsigned N_LEVELS    = 5,
  parameter int unsigned ROB_LS_B [N_LEVELS] = '{64, 56, 48, 40, 32},
  parameter int unsigned ROB_LS_Q [N_LEVELS] = '{128, 136, 144, 152, 160},
  localparam int unsigned RCW = $clog2(ROB_ENTRIES + 1),
  localparam int unsigned LCW = $clog2(LSQ_ENTRIES + 1)
) (
  input  cfg_t           cfg_i,
  output logic [RCW-1:0] rob_limit [NT],
  output logic [LCW-1:0] lsq_limit [NT]
);

  // LSQ share in proportion to a ROB share, rounded to nearest.
  function automatic int unsigned lsq_share(input int unsigned rob_share);
    return (rob_share * LSQ_ENTRIES + ROB_ENTRIES / 2) / ROB_ENTRIES;
  endfunction

  logic [RCW-1:0] rob_ls;
  logic [LCW-1:0] lsq_ls;
  logic [LVL_W-1:0] lvl;

  always_comb begin
    lvl = (int'(cfg_i.level) >= N_LEVELS) ? LVL_W'(N_LEVELS - 1) : cfg_i.level;
    unique case (cfg_i.mode)
      MODE_B: begin
        rob_ls = RCW'(ROB_LS_B[lvl]);
        lsq_ls = LCW'(lsq_share(ROB_LS_B[lvl]));
      end
      MODE_Q: begin
        rob_ls = RCW'(ROB_LS_Q[lvl]);
        lsq_ls = LCW'(lsq_share(ROB_LS_Q[lvl]));
      end
      default: begin
        rob_ls = RCW'(ROB_ENTRIES / 2);
        lsq_ls = LCW'(LSQ_ENTRIES / 2);
      end
    endcase
    for (int t = 0; t < NT; t++) begin
      if (1'(t) == cfg_i.ls_tid) begin
        rob_limit[t] = rob_ls;
        lsq_limit[t] = lsq_ls;
      end else begin
        rob_limit[t] = RCW'(ROB_ENTRIES) - rob_ls;
        lsq_limit[t] = LCW'(LSQ_ENTRIES) - lsq_ls;
      end
    end
  end

  initial begin
    for (int k = 0; k < N_LEVELS; k++) begin
      assert (ROB_LS_B[k] < ROB_ENTRIES && ROB_LS_Q[k] < ROB_ENTRIES)
        else $error("ROB share of the latency-sensitive thread must leave room for the other");
      assert (lsq_share(ROB_LS_B[k]) >= 1 && lsq_share(ROB_LS_Q[k]) < LSQ_ENTRIES)
        else $error("LSQ share out of range");
    end
  end

endmodule
