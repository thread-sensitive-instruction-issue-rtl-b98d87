// smt_issue_top: thread-sensitive instruction issue stage of an SMT core with a
// partitioned instruction queue.
//
// The instruction queue is split into NUM_THREADS sub-queues of SUBQ_SIZE
// entries, one per hardware thread. Each sub-queue has its own scheduler: an
// OLDEST selector that picks the thread's oldest ready instructions, limited
// to G per cycle, where G is set by the thread-sensitive scheduler from the
// thread's ready instruction count (RIC):
//     G = max(RIC * ISSUE_RATE / (NUM_THREADS*SUBQ_SIZE), RIC > 0 ? 1 : 0).
// A thread with more ready work gets a larger share of the issue bandwidth,
// every thread with ready work gets at least one instruction, and the limits
// never add up to more than ISSUE_RATE, so the merge can always place every
// granted instruction in an issue slot. The structure and the rule follow the
// original proposal; the queue organisation, wakeup interface and slot packing are
// this design's own (see the blocks' headers).
//
// Timing: an instruction dispatched in cycle t sits in its sub-queue from t+1.
// RIC in a cycle sets G for the following cycle. A ready instruction that is
// the oldest ready one of its thread is therefore issued two cycles after its
// dispatch when its thread's queue had no ready work before, one cycle after
// when it already had G > 0. Issue is combinational from the registered queue
// state to the issue slots.
//
// Ports (per thread t): dispatch lanes disp_valid[t]/disp_rdy[t]/
// disp_payload[t] with accept, the slot each lane takes and the free count;
// wake[t][i] marks slot i of thread t ready. Out: the ISSUE_RATE issue slots
// and their count, and each thread's RIC and G for observation.
module smt_issue_top
  import smt_issue_pkg::*;
#(
  parameter int unsigned NUM_THREADS = smt_issue_pkg::DEF_NUM_THREADS,
  parameter int unsigned SUBQ_SIZE   = smt_issue_pkg::DEF_SUBQ_SIZE,
  parameter int unsigned ISSUE_RATE  = smt_issue_pkg::DEF_ISSUE_RATE,
  parameter int unsigned DISPATCH_W  = smt_issue_pkg::DEF_DISPATCH_WIDTH,
  localparam int unsigned LANES      = g_max(SUBQ_SIZE, NUM_THREADS, ISSUE_RATE),
  localparam int unsigned SLOT_W     = (SUBQ_SIZE > 1) ? $clog2(SUBQ_SIZE) : 1,
  localparam int unsigned CNT_W      = $clog2(SUBQ_SIZE + 1),
  localparam int unsigned G_W        = $clog2(LANES + 1),
  localparam int unsigned ISS_W      = $clog2(ISSUE_RATE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // dispatch, per thread
  input  logic [DISPATCH_W-1:0] disp_valid   [NUM_THREADS],
  input  logic [DISPATCH_W-1:0] disp_rdy     [NUM_THREADS],
  input  payload_t              disp_payload [NUM_THREADS][DISPATCH_W],
  output logic [DISPATCH_W-1:0] disp_accept  [NUM_THREADS],
  output logic [SLOT_W-1:0]     disp_slot    [NUM_THREADS][DISPATCH_W],
  output logic [CNT_W-1:0]      free         [NUM_THREADS],
  // wakeup, per thread and slot
  input  logic [SUBQ_SIZE-1:0]  wake         [NUM_THREADS],
  // issue towards the functional units
  output issue_slot_t           issue        [ISSUE_RATE],
  output logic [ISS_W-1:0]      n_issued,
  // thread metric and grant limit
  output logic [CNT_W-1:0]      ric          [NUM_THREADS],
  output logic [G_W-1:0]        g            [NUM_THREADS]
);

  if (NUM_THREADS > ISSUE_RATE) begin : g_rate_chk
    $error("smt_issue_top: the grant bound needs NUM_THREADS <= ISSUE_RATE");
  end
  if (NUM_THREADS > (1 << TID_FIELD_W) || SUBQ_SIZE > (1 << SLOT_FIELD_W)) begin : g_field_chk
    $error("smt_issue_top: sizes exceed the field widths of smt_issue_pkg");
  end

  lane_t lanes [NUM_THREADS][LANES];

  for (genvar t = 0; t < NUM_THREADS; t++) begin : g_part
    logic [SUBQ_SIZE-1:0] req;
    logic [SLOT_W-1:0]    head;
    logic [LANES-1:0]     lane_valid;
    logic [SLOT_W-1:0]    lane_slot    [LANES];
    payload_t             lane_payload [LANES];

    iq_subqueue #(
      .SUBQ_SIZE  (SUBQ_SIZE),
      .DISPATCH_W (DISPATCH_W),
      .LANES      (LANES)
    ) u_subq (
      .clk          (clk),
      .rst_n        (rst_n),
      .disp_valid   (disp_valid[t]),
      .disp_rdy     (disp_rdy[t]),
      .disp_payload (disp_payload[t]),
      .disp_accept  (disp_accept[t]),
      .disp_slot    (disp_slot[t]),
      .free         (free[t]),
      .wake         (wake[t]),
      .req          (req),
      .ric          (ric[t]),
      .head         (head),
      .iss_valid    (lane_valid),
      .iss_slot     (lane_slot),
      .iss_payload  (lane_payload)
    );

    partition_scheduler #(
      .NUM_THREADS (NUM_THREADS),
      .SUBQ_SIZE   (SUBQ_SIZE),
      .ISSUE_RATE  (ISSUE_RATE)
    ) u_sched (
      .clk        (clk),
      .rst_n      (rst_n),
      .req        (req),
      .head       (head),
      .ric        (ric[t]),
      .lane_valid (lane_valid),
      .lane_slot  (lane_slot),
      .g_q        (g[t])
    );

    for (genvar l = 0; l < LANES; l++) begin : g_lane
      assign lanes[t][l].valid   = lane_valid[l];
      assign lanes[t][l].slot    = SLOT_FIELD_W'(lane_slot[l]);
      assign lanes[t][l].payload = lane_payload[l];
    end
  end

  issue_merge #(
    .NUM_THREADS (NUM_THREADS),
    .LANES       (LANES),
    .ISSUE_RATE  (ISSUE_RATE)
  ) u_merge (
    .lanes    (lanes),
    .slots    (issue),
    .n_issued (n_issued)
  );

endmodule
