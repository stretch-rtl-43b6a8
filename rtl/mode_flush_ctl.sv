// mode_flush_ctl: applies a Stretch mode change through a pipeline flush.
//
// Any change of the partition configuration is accompanied by a flush of
// both threads. When the requested configuration (cfg_req) differs from
// the one in force (cfg_cur) and no flush is running, the controller
// raises flush_start for one cycle: in that cycle the ROB and LSQ of both
// threads are emptied and their limit registers are loaded with the new
// configuration, and cfg_cur takes the new value at the clock edge.
// flushing stays high for FLUSH_CYCLES cycles in total (the flush penalty
// of the modelled core, 12 cycles) and holds dispatch and commit off. A
// request that changes again during a flush is taken up when the flush
// ends. That the flush penalty is counted from the cycle of flush_start
// is this design's reading.
//
// flush_count counts the mode-change flushes (wraps).
module mode_flush_ctl
  import stretch_pkg::*;
#(
  parameter int unsigned FLUSH_CYCLES = 12,
  localparam int unsigned FCW = $clog2(FLUSH_CYCLES + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg_req,
  output cfg_t        cfg_cur,
  output logic        flush_start,
  output logic        flushing,
  output logic [15:0] flush_count
);

  logic [FCW-1:0] remain_q;  // flush cycles still to go after this one

  assign flush_start = (remain_q == '0) && (cfg_req != cfg_cur);
  assign flushing    = flush_start || (remain_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_cur     <= '{mode: MODE_BASE, ls_tid: 1'b0, level: '0};
      remain_q    <= '0;
      flush_count <= '0;
    end else if (flush_start) begin
      cfg_cur     <= cfg_req;
      remain_q    <= FCW'(FLUSH_CYCLES - 1);
      flush_count <= flush_count + 16'd1;
    end else if (remain_q != '0) begin
      remain_q    <= remain_q - 1'b1;
    end
  end

  initial assert (FLUSH_CYCLES >= 1) else $error("FLUSH_CYCLES must be at least 1");

endmodule
