// iq_subqueue: the instruction sub-queue of one thread (one IQ partition).
//
// Each thread owns SUBQ_SIZE entries of the instruction queue. The entries form
// a circular buffer: dispatch writes at the tail, head points at the oldest
// entry still waiting, so age order is the ring order from head. An entry
// leaves the queue when it is issued, which may be out of order; the hole it
// leaves is not refilled until head has moved past it (head skips every
// issued entry at its front each cycle). Holding one thread per partition and
// counting its ready instructions (RIC, the metric of the thread-sensitive
// scheduler) follows the original proposal; the non-collapsing ring, the wakeup by slot
// mask and the dispatch handshake are this design's own choices.
//
// Interface and timing (all on the rising clk edge, asynchronous active-low
// reset empties the queue):
//  * Dispatch: up to DISPATCH_W instructions per cycle on disp_valid[0..],
//    which must be filled from lane 0 upward. Lane j is accepted when
//    disp_valid[j] and j < free; free (= SUBQ_SIZE - occupied span) is a
//    registered count, so disp_accept[j] = disp_valid[j] && j < free. An
//    accepted instruction lands in slot disp_slot[j] and is visible from the
//    next cycle; disp_rdy[j] says its operands are already available.
//  * Wakeup: wake[i] marks the instruction in slot i ready (from the next
//    cycle on).
//  * Readiness: req[i] = slot i valid and ready, ric = popcount(req), head =
//    oldest slot. These are the current state, before this cycle's issue.
//  * Issue: iss_valid/iss_slot per lane name the slots the selector granted;
//    iss_payload returns their instructions in the same cycle and the slots
//    are freed at the clock edge.
module iq_subqueue
  import smt_issue_pkg::*;
#(
  parameter int unsigned SUBQ_SIZE  = smt_issue_pkg::DEF_SUBQ_SIZE,
  parameter int unsigned DISPATCH_W = smt_issue_pkg::DEF_DISPATCH_WIDTH,
  parameter int unsigned LANES      = 1,
  localparam int unsigned SLOT_W    = (SUBQ_SIZE > 1) ? $clog2(SUBQ_SIZE) : 1,
  localparam int unsigned CNT_W     = $clog2(SUBQ_SIZE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // dispatch
  input  logic [DISPATCH_W-1:0] disp_valid,
  input  logic [DISPATCH_W-1:0] disp_rdy,
  input  payload_t              disp_payload [DISPATCH_W],
  output logic [DISPATCH_W-1:0] disp_accept,
  output logic [SLOT_W-1:0]     disp_slot    [DISPATCH_W],
  output logic [CNT_W-1:0]      free,
  // wakeup
  input  logic [SUBQ_SIZE-1:0]  wake,
  // state towards the scheduler
  output logic [SUBQ_SIZE-1:0]  req,
  output logic [CNT_W-1:0]      ric,
  output logic [SLOT_W-1:0]     head,
  // issue
  input  logic [LANES-1:0]      iss_valid,
  input  logic [SLOT_W-1:0]     iss_slot     [LANES],
  output payload_t              iss_payload  [LANES]
);

  iq_entry_t              q     [SUBQ_SIZE];
  logic [SLOT_W-1:0]      head_q;
  logic [CNT_W-1:0]       span_q;           // slots from head to tail

  logic [SUBQ_SIZE-1:0]   valid_now;
  logic [SUBQ_SIZE-1:0]   clr;
  logic [SUBQ_SIZE-1:0]   valid_left;       // valid after this cycle's issue
  logic [CNT_W-1:0]       skip;             // issued/empty slots at the front
  logic [CNT_W-1:0]       n_acc;

  // Current state.
  always_comb begin
    for (int i = 0; i < SUBQ_SIZE; i++) begin
      valid_now[i] = q[i].valid;
      req[i]       = q[i].valid && q[i].ready;
    end
    ric  = '0;
    for (int i = 0; i < SUBQ_SIZE; i++) ric = ric + CNT_W'(req[i]);
    head = head_q;
    free = CNT_W'(SUBQ_SIZE) - span_q;
  end

  // Dispatch acceptance and the slots the accepted instructions take.
  always_comb begin
    n_acc = '0;
    for (int j = 0; j < DISPATCH_W; j++) begin
      disp_accept[j] = disp_valid[j] && (j < int'(free));
      disp_slot[j]   = SLOT_W'((int'(head_q) + int'(span_q) + j) % SUBQ_SIZE);
      if (disp_accept[j]) n_acc = n_acc + 1'b1;
    end
  end

  // Issue: read out the granted instructions and free their slots.
  always_comb begin
    clr = '0;
    for (int l = 0; l < LANES; l++) begin
      iss_payload[l] = q[iss_slot[l]].payload;
      if (iss_valid[l]) clr[iss_slot[l]] = 1'b1;
    end
    valid_left = valid_now & ~clr;
  end

  // Head advance: count the leading slots of the occupied span that hold no
  // waiting instruction any more.
  always_comb begin
    logic stop;
    stop = 1'b0;
    skip = '0;
    for (int i = 0; i < SUBQ_SIZE; i++) begin
      if (!stop && i < int'(span_q)) begin
        if (valid_left[(int'(head_q) + i) % SUBQ_SIZE]) stop = 1'b1;
        else                                           skip = skip + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      span_q <= '0;
      for (int i = 0; i < SUBQ_SIZE; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < SUBQ_SIZE; i++) begin
        if (clr[i])                       q[i].valid <= 1'b0;
        else if (wake[i] && q[i].valid)   q[i].ready <= 1'b1;
      end
      for (int j = 0; j < DISPATCH_W; j++) begin
        if (disp_accept[j]) begin
          q[disp_slot[j]].valid   <= 1'b1;
          q[disp_slot[j]].ready   <= disp_rdy[j];
          q[disp_slot[j]].payload <= disp_payload[j];
        end
      end
      head_q <= SLOT_W'((int'(head_q) + int'(skip)) % SUBQ_SIZE);
      span_q <= span_q - skip + n_acc;
    end
  end

  // Dispatch lanes are filled from lane 0 upward.
  for (genvar j = 1; j < DISPATCH_W; j++) begin : g_disp_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     disp_valid[j] |-> disp_valid[j-1])
      else $error("iq_subqueue: dispatch lane %0d used while lane %0d empty", j, j-1);
  end

  // Only waiting instructions may be issued.
  assert property (@(posedge clk) disable iff (!rst_n) (clr & ~req) == '0)
    else $error("iq_subqueue: issue of a slot that is not valid and ready");

endmodule
