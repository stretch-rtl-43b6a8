// part_limit_ctr: the limit register / usage register pair of one thread
// in one partitioned structure (ROB or LSQ).
//
// The usage register counts the entries the thread holds: it grows by
// alloc_n and shrinks by rel_n every cycle. The limit register holds the
// most entries the thread may occupy; it is programmable and is loaded
// from limit_in on `load`. blocked is raised when usage has reached the
// limit, which stops issue into the structure for this thread; free_n is
// limit - usage, the room left this cycle. This follows the description of
// the mechanism; counting several allocations and releases per cycle is
// this design's choice for a 6-wide core.
//
// `clear` empties the partition (pipeline flush). A flush is the only
// time the limit is reloaded, so the usage can never exceed a new limit;
// load and clear are expected together.
module part_limit_ctr #(
  parameter int unsigned CAP         = 192,  // entries in the whole structure
  parameter int unsigned MAX_ALLOC   = 6,    // allocations per cycle
  parameter int unsigned MAX_REL     = 6,    // releases per cycle
  parameter int unsigned RESET_LIMIT = 96,   // limit after reset
  localparam int unsigned CW = $clog2(CAP + 1),
  localparam int unsigned AW = $clog2(MAX_ALLOC + 1),
  localparam int unsigned RW = $clog2(MAX_REL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] limit_in,
  input  logic          clear,
  input  logic [AW-1:0] alloc_n,
  input  logic [RW-1:0] rel_n,
  output logic [CW-1:0] limit,
  output logic [CW-1:0] usage,
  output logic [CW-1:0] free_n,
  output logic          blocked
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      limit <= CW'(RESET_LIMIT);
      usage <= '0;
    end else begin
      if (load)  limit <= limit_in;
      if (clear) usage <= '0;
      else       usage <= usage + CW'(alloc_n) - CW'(rel_n);
    end
  end

  assign blocked = (usage >= limit);
  assign free_n  = blocked ? '0 : limit - usage;

  always_ff @(posedge clk) begin
    if (rst_n && !clear) begin
      assert (CW'(alloc_n) <= free_n) else $error("allocation beyond the thread's limit");
      assert (CW'(rel_n) <= usage)    else $error("release of more entries than held");
    end
    if (rst_n && load) assert (clear) else $error("limit reloaded without a flush");
  end

endmodule
