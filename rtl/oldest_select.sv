// oldest_select: intra-thread OLDEST(G) selector of one partition.
//
// The sub-queue is a circular buffer whose oldest entry sits at index head;
// age grows from head around the ring. The selector walks the ring from head
// and grants the first ready entries it meets, at most g of them (the limit
// the thread-sensitive scheduler computed in the previous cycle) and at most
// LANES of them (the largest g can be). The k-th grant is put on lane k, so
// lane 0 always carries the oldest granted instruction. Selecting the oldest
// ready instructions up to a limit is the OLDEST policy of the original proposal; the
// ring walk and the lane numbering are this design's own.
//
// Interface: req[i] = entry i valid and ready; head = index of the oldest
// entry; g = grant limit. Outputs lane_valid/lane_slot per lane and the grant
// mask over the entries. Purely combinational.
module oldest_select #(
  parameter int unsigned SUBQ_SIZE = smt_issue_pkg::DEF_SUBQ_SIZE,
  parameter int unsigned LANES     = 1,
  localparam int unsigned SLOT_W   = (SUBQ_SIZE > 1) ? $clog2(SUBQ_SIZE) : 1,
  localparam int unsigned G_W      = $clog2(LANES + 1)
) (
  input  logic [SUBQ_SIZE-1:0] req,
  input  logic [SLOT_W-1:0]    head,
  input  logic [G_W-1:0]       g,
  output logic [LANES-1:0]     lane_valid,
  output logic [SLOT_W-1:0]    lane_slot [LANES],
  output logic [SUBQ_SIZE-1:0] grant
);

  always_comb begin
    int unsigned cnt;
    logic [SLOT_W-1:0] idx;
    cnt        = 0;
    grant      = '0;
    lane_valid = '0;
    for (int l = 0; l < LANES; l++) lane_slot[l] = '0;
    for (int unsigned i = 0; i < SUBQ_SIZE; i++) begin
      idx = SLOT_W'((int'(head) + i) % SUBQ_SIZE);
      if (req[idx] && cnt < int'(g) && cnt < LANES) begin
        grant[idx]      = 1'b1;
        lane_valid[cnt] = 1'b1;
        lane_slot[cnt]  = SLOT_W'(idx);
        cnt             = cnt + 1;
      end
    end
  end

endmodule
