// stretch_ctrl_reg: the software-visible Stretch control register.
//
// System software writes six bits, {LEVEL[2:0], LS_TID, B/Q, S}. S engages
// a Stretch mode; B/Q picks batch boost (0) or QoS boost (1); LS_TID names
// the hardware thread that runs the latency-sensitive work; LEVEL picks one
// of the N_LEVELS provisioned splits of the chosen mode. The S and B/Q
// bits and their meaning follow the design description, which also allows
// several provisioned splits per mode and either hardware thread as the
// latency-sensitive one; the LS_TID and LEVEL fields and all bit positions
// are this design's encoding of those two freedoms.
//
// The register decodes its contents into the configuration that should be
// in force (cfg_o). Q-mode is optional: with HAS_QMODE = 0 a Q request
// falls back to Baseline, as the description allows for cores without
// Q-mode. A LEVEL beyond the provisioned ones saturates at the last level.
// Baseline is reported with ls_tid = 0 and level = 0 so that rewriting
// those fields while S is clear does not count as a mode change.
//
// Interface: wr_en/wr_data write the register on the rising clock edge;
// rd_data reads it back; cfg_o is combinational from the register, so a
// write is visible on cfg_o in the cycle after it. Reset clears all bits
// (Baseline).
module stretch_ctrl_reg
  import stretch_pkg::*;
#(
  parameter bit          HAS_QMODE = 1'b1,
  parameter int unsigned N_LEVELS  = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [LVL_W+2:0]     wr_data,  // {LEVEL, LS_TID, B/Q, S}
  output logic [LVL_W+2:0]     rd_data,
  output cfg_t                 cfg_o
);

  ctrl_t            ctrl_q;
  logic [LVL_W-1:0] level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ctrl_q <= '0;
    else if (wr_en) ctrl_q <= ctrl_t'(wr_data);
  end

  assign rd_data = ctrl_q;
  assign level   = (int'(ctrl_q.level) >= N_LEVELS) ? LVL_W'(N_LEVELS - 1) : ctrl_q.level;

  always_comb begin
    cfg_o = '{mode: MODE_BASE, ls_tid: 1'b0, level: '0};
    if (ctrl_q.s) begin
      if (!ctrl_q.bq)     cfg_o = '{mode: MODE_B, ls_tid: ctrl_q.ls_tid, level: level};
      else if (HAS_QMODE) cfg_o = '{mode: MODE_Q, ls_tid: ctrl_q.ls_tid, level: level};
    end
  end

  initial assert (N_LEVELS >= 1 && N_LEVELS <= 2 ** LVL_W) else $error("N_LEVELS out of range");

endmodule
