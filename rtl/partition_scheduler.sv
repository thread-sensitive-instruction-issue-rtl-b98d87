// partition_scheduler: the issue scheduler of one partition.
//
// Two parts, as in the original proposal's drawing of one partitioned scheduler: an
// intra-thread OLDEST selector over the thread's sub-queue, and the
// thread-sensitive scheduler (TSS) that turns the thread's ready instruction
// count into the grant limit G. G computed in cycle t limits the selector in
// cycle t+1; the selector itself is combinational, so a granted instruction is
// named in the same cycle its sub-queue presents it as ready. The adder over
// all threads' metrics that a general metric would need is absent: with the
// ready instruction count as metric the sum is bounded by the queue size n,
// which replaces it.
//
// Interface: req/head/ric from the sub-queue; lane_valid/lane_slot (up to
// LANES = largest G instructions, oldest on lane 0) back to it; g_q is the
// current limit, brought out for observation.
module partition_scheduler
  import smt_issue_pkg::*;
#(
  parameter int unsigned NUM_THREADS = smt_issue_pkg::DEF_NUM_THREADS,
  parameter int unsigned SUBQ_SIZE   = smt_issue_pkg::DEF_SUBQ_SIZE,
  parameter int unsigned ISSUE_RATE  = smt_issue_pkg::DEF_ISSUE_RATE,
  localparam int unsigned LANES      = g_max(SUBQ_SIZE, NUM_THREADS, ISSUE_RATE),
  localparam int unsigned SLOT_W     = (SUBQ_SIZE > 1) ? $clog2(SUBQ_SIZE) : 1,
  localparam int unsigned RIC_W      = $clog2(SUBQ_SIZE + 1),
  localparam int unsigned G_W        = $clog2(LANES + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SUBQ_SIZE-1:0] req,
  input  logic [SLOT_W-1:0]    head,
  input  logic [RIC_W-1:0]     ric,
  output logic [LANES-1:0]     lane_valid,
  output logic [SLOT_W-1:0]    lane_slot [LANES],
  output logic [G_W-1:0]       g_q
);

  logic [SUBQ_SIZE-1:0] grant_unused;

  tss #(
    .NUM_THREADS (NUM_THREADS),
    .SUBQ_SIZE   (SUBQ_SIZE),
    .ISSUE_RATE  (ISSUE_RATE)
  ) u_tss (
    .clk   (clk),
    .rst_n (rst_n),
    .ric   (ric),
    .g_q   (g_q)
  );

  oldest_select #(
    .SUBQ_SIZE (SUBQ_SIZE),
    .LANES     (LANES)
  ) u_oldest (
    .req        (req),
    .head       (head),
    .g          (g_q),
    .lane_valid (lane_valid),
    .lane_slot  (lane_slot),
    .grant      (grant_unused)
  );

endmodule
