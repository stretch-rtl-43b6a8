// stretch_pkg: types and constants shared by the Stretch SMT back-end.
//
// The back-end serves two hardware threads (NT = 2). A micro-op carries
// only what the partitioned structures need to see: whether it occupies a
// load/store-queue entry, whether it is a store, and an opaque tag that the
// rest of the core uses to name it (here a program-order sequence number
// or a PC). The partition mode is the one chosen through the Stretch
// control register: Baseline (equal halves), B-mode (batch boost: small
// share for the latency-sensitive thread) and Q-mode (QoS boost: large
// share for the latency-sensitive thread).
package stretch_pkg;

  localparam int unsigned NT    = 2;   // hardware threads per core
  localparam int unsigned TAG_W = 16;  // width of the opaque micro-op tag
  localparam int unsigned LVL_W = 3;   // width of the configuration level field

  typedef enum logic [1:0] {
    MODE_BASE = 2'd0,  // equal partitioning (S bit clear)
    MODE_B    = 2'd1,  // batch boost
    MODE_Q    = 2'd2   // QoS boost
  } mode_e;

  // Raw contents of the architecturally visible control register.
  typedef struct packed {
    logic [LVL_W-1:0] level;  // which provisioned B- or Q-mode split
    logic ls_tid;  // hardware thread that runs the latency-sensitive work
    logic bq;      // 0 selects B-mode, 1 selects Q-mode
    logic s;       // 1 engages a Stretch mode, 0 selects Baseline
  } ctrl_t;

  // Partition configuration actually in force. ls_tid and level are 0 in
  // Baseline so that two Baseline requests never differ.
  typedef struct packed {
    mode_e            mode;
    logic             ls_tid;
    logic [LVL_W-1:0] level;
  } cfg_t;

  typedef struct packed {
    logic             is_mem;    // needs an LSQ entry
    logic             is_store;  // store (only meaningful with is_mem)
    logic [TAG_W-1:0] tag;
  } uop_t;

endpackage
