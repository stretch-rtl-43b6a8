// dispatch_ctl: shares the dispatch slots of the core between two threads.
//
// Each cycle each thread offers up to W micro-ops in program order
// (in_cnt[t], in_uop[t][0..]). The ICOUNT selector picks a primary
// thread, the one with fewer instructions in flight. The primary thread
// takes its micro-ops in order until one does not fit: its ROB partition
// is full (rob_free) or, for a memory op, its LSQ partition is full
// (lsq_free), or all W slots are used. If the primary thread leaves slots
// unused, the other thread fills them in the same cycle under the same
// rules. Nothing is dispatched while `stall` is high (pipeline flush).
// ICOUNT selection and the switch to the other thread follow the design
// description; stopping a thread at its first micro-op that does not fit
// (in-order dispatch) is this design's choice.
//
// Outputs (combinational): take[t] micro-ops consumed from thread t; for
// each slot s, slot_valid/slot_tid/slot_pos say which thread and which of
// its offered micro-ops occupy it; rob_full/lsq_full report a thread held
// back by its ROB or LSQ limit while it still had micro-ops to offer.
module dispatch_ctl
  import stretch_pkg::*;
#(
  parameter int unsigned W   = 6,
  parameter int unsigned RCW = 8,  // width of ROB counts
  parameter int unsigned LCW = 7,  // width of LSQ counts
  localparam int unsigned NW = $clog2(W + 1),
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           stall,
  input  logic [NW-1:0]  in_cnt   [NT],
  input  uop_t           in_uop   [NT][W],
  input  logic [RCW-1:0] rob_free [NT],
  input  logic [LCW-1:0] lsq_free [NT],
  input  logic [RCW-1:0] icount   [NT],
  output logic           primary,
  output logic [NW-1:0]  take     [NT],
  output logic           slot_valid [W],
  output logic           slot_tid   [W],
  output logic [PW-1:0]  slot_pos   [W],
  output logic           rob_full [NT],
  output logic           lsq_full [NT]
);

  icount_sel #(.CW(RCW)) u_icount (
    .clk    (clk),
    .rst_n  (rst_n),
    .advance(!stall),
    .icount (icount),
    .sel    (primary)
  );

  // How many of thread t's offered micro-ops fit in `budget` slots, and
  // which limit stopped it.
  function automatic void fit(input int unsigned t, input int unsigned budget,
                              output int unsigned n, output logic rf, output logic lf);
    int unsigned mem;
    logic stop;
    n = 0; mem = 0; stop = 1'b0; rf = 1'b0; lf = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (!stop) begin
        if (i >= budget || i >= int'(in_cnt[t])) begin
          stop = 1'b1;
        end else if (n >= int'(rob_free[t])) begin
          stop = 1'b1; rf = 1'b1;
        end else if (in_uop[t][i].is_mem && mem >= int'(lsq_free[t])) begin
          stop = 1'b1; lf = 1'b1;
        end else begin
          n++;
          if (in_uop[t][i].is_mem) mem++;
        end
      end
    end
  endfunction

  always_comb begin
    int unsigned np, no;
    logic rfp, lfp, rfo, lfo;
    int unsigned p, o;
    p = primary ? 1 : 0;
    o = 1 - p;
    if (stall) begin
      np = 0; no = 0; rfp = 1'b0; lfp = 1'b0; rfo = 1'b0; lfo = 1'b0;
    end else begin
      fit(p, W, np, rfp, lfp);
      fit(o, W - np, no, rfo, lfo);
    end
    take[p]     = NW'(np);
    take[o]     = NW'(no);
    rob_full[p] = rfp;
    lsq_full[p] = lfp;
    rob_full[o] = rfo;
    lsq_full[o] = lfo;
    for (int unsigned s = 0; s < W; s++) begin
      slot_valid[s] = (s < np + no);
      slot_tid[s]   = (s < np) ? primary : ~primary;
      slot_pos[s]   = (s < np) ? PW'(s) : PW'(s - np);
    end
  end

endmodule
