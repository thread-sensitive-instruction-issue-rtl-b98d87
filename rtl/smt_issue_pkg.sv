// smt_issue_pkg: constants and types shared by the partitioned SMT issue stage.
//
// The default machine is the eight-thread configuration: eight hardware thread
// contexts (k), a 16-entry instruction sub-queue per thread (m), so a 128-entry
// instruction queue in total (n = k*m), an issue rate of 12 instructions per
// cycle and a per-thread dispatch bandwidth of 4 instructions per cycle. These
// numbers follow the evaluated processor. The 32-bit instruction payload is
// this design's own choice: the issue stage only carries it.
//
// The module parameters of the blocks default to these constants. The field
// widths of the shared structs are taken from them too, so a block built with
// a smaller thread count or sub-queue still fits its values into the structs.
package smt_issue_pkg;

  // Default machine configuration.
  localparam int unsigned DEF_NUM_THREADS    = 8;   // k: thread contexts = partitions
  localparam int unsigned DEF_SUBQ_SIZE      = 16;  // m: entries per sub-queue
  localparam int unsigned DEF_ISSUE_RATE     = 12;  // IssueRate_total
  localparam int unsigned DEF_DISPATCH_WIDTH = 4;   // instructions per thread per cycle
  localparam int unsigned PAYLOAD_W      = 32;  // carried instruction bits

  // Field widths of the shared structs.
  localparam int unsigned TID_FIELD_W  = (DEF_NUM_THREADS > 1) ? $clog2(DEF_NUM_THREADS) : 1;
  localparam int unsigned SLOT_FIELD_W = (DEF_SUBQ_SIZE > 1) ? $clog2(DEF_SUBQ_SIZE) : 1;

  typedef logic [PAYLOAD_W-1:0] payload_t;

  // One instruction sub-queue entry.
  typedef struct packed {
    logic     valid;    // holds an instruction not yet issued
    logic     ready;    // all source operands available
    payload_t payload;
  } iq_entry_t;

  // One instruction leaving a partition (one issue lane of a partition).
  typedef struct packed {
    logic              valid;
    logic [SLOT_FIELD_W-1:0] slot;     // sub-queue slot it came from
    payload_t          payload;
  } lane_t;

  // One issue slot towards the functional units.
  typedef struct packed {
    logic              valid;
    logic [TID_FIELD_W-1:0]  tid;      // owning thread (partition index)
    logic [SLOT_FIELD_W-1:0] slot;
    payload_t          payload;
  } issue_slot_t;

  // Largest grant a partition can receive in one cycle: the shifted value of
  // Eq. (1) at a full sub-queue of ready instructions, but at least 1 because
  // the starvation rule raises a zero grant to one.
  function automatic int unsigned g_max(int unsigned subq, int unsigned threads,
                                        int unsigned rate);
    int unsigned g;
    g = (subq * rate) / (subq * threads);
    return (g < 1) ? 1 : g;
  endfunction

endpackage
