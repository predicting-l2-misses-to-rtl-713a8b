// l2p_pkg: types and constants shared by the late-inserting scheduler.
//
// The scheduler keeps instructions that depend on loads predicted to miss in
// the L2 cache out of the issue queue; they wait in an Instruction Buffer (IB)
// and are inserted when the miss resolves. This package fixes the widths of
// the values that travel between its blocks: physical-register tags, IB entry
// identifiers, the per-load prediction record and the renamed micro-op.
//
// Widths that follow the processor configuration: 4-wide rename/issue, 8-wide
// commit, 2048-entry ROB (hence IB ids of 11 bits), 11-bit global history.
// Design choices of this implementation: 12-bit physical register tags
// (2048 + 64 registers by default), a 16-bit opaque operation field carried
// for the execution side, a 32-bit PC, and an 8-bit prediction sequence
// number used to find a prediction's bit in the history register.
package l2p_pkg;

  localparam int unsigned PREG_W   = 12;   // physical register tag
  localparam int unsigned IBID_W   = 11;   // IB entry id (2048 entries)
  localparam int unsigned PC_W     = 32;
  localparam int unsigned OP_W     = 16;   // opaque operation payload
  localparam int unsigned GHR_LEN  = 11;   // global history register length
  localparam int unsigned PSEQ_W   = 8;    // prediction sequence number
  localparam int unsigned WCNT_W   = 7;    // perceptron weight width

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [IBID_W-1:0] ibid_t;

  // What the L2 hit/miss predictor tells about one load. It travels with the
  // load so the history can be corrected and the predictor trained later.
  typedef struct packed {
    logic                 used;   // filter said "has missed before": perceptron looked up
    logic                 miss;   // predicted to miss in L2
    logic [GHR_LEN-1:0]   ghr;    // history the prediction was made with
    logic [PSEQ_W-1:0]    seq;    // sequence number of the prediction
  } pred_t;

  // A renamed instruction as seen by the Filter, the IB and the issue queues.
  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [OP_W-1:0] op;
    logic            s1_v;
    preg_t           s1;
    logic            s2_v;
    preg_t           s2;
    logic            d_v;
    preg_t           d;
    logic            is_load;
    logic            is_fp;     // goes to the floating-point issue queue
    pred_t           pred;
  } uop_t;

  // An instruction on its way into an issue queue.
  typedef struct packed {
    uop_t  uop;
    ibid_t ib_id;
  } iq_in_t;

  // Outcome reported to the re-issue logic for a load, with the load's IB id.
  typedef enum logic [2:0] {
    EV_L1_HIT, EV_L1_MISS, EV_L2_HIT, EV_L2_MISS,
    EV_UNKNOWN_STA, EV_UNAVAIL_STD, EV_NO_MSHR
  } rb_ev_t;

endpackage
