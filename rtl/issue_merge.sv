// issue_merge: packs the partitions' issued instructions into the issue slots.
//
// Every partition offers up to LANES instructions per cycle. The merge gives
// each valid lane its own issue slot towards the functional units, packing them
// from slot 0 upward in thread order (thread 0 first, lane 0 first within a
// thread) and tagging each with its thread ID. The grant limits of the
// thread-sensitive schedulers never sum to more than ISSUE_RATE (the original proposal
// derives this bound; it holds while NUM_THREADS <= ISSUE_RATE), so every
// offered instruction finds a slot; an assertion checks it. The packing order
// is this design's own choice: the original proposal only says that the granted
// instructions occupy the functional units that can be used in one cycle.
//
// Interface: lanes[t][l] in; slots[0..ISSUE_RATE-1] and the number of valid
// slots out. Purely combinational.
module issue_merge
  import smt_issue_pkg::*;
#(
  parameter int unsigned NUM_THREADS = smt_issue_pkg::DEF_NUM_THREADS,
  parameter int unsigned LANES       = 1,
  parameter int unsigned ISSUE_RATE  = smt_issue_pkg::DEF_ISSUE_RATE,
  localparam int unsigned CNT_W      = $clog2(ISSUE_RATE + 1)
) (
  input  lane_t        lanes [NUM_THREADS][LANES],
  output issue_slot_t  slots [ISSUE_RATE],
  output logic [CNT_W-1:0] n_issued
);

  logic [$clog2(NUM_THREADS*LANES+1)-1:0] offered;

  always_comb begin
    int unsigned pos;
    pos     = 0;
    offered = '0;
    for (int s = 0; s < ISSUE_RATE; s++) slots[s] = '0;
    for (int t = 0; t < NUM_THREADS; t++) begin
      for (int l = 0; l < LANES; l++) begin
        if (lanes[t][l].valid) begin
          offered = offered + 1'b1;
          if (pos < ISSUE_RATE) begin
            slots[pos].valid   = 1'b1;
            slots[pos].tid     = TID_FIELD_W'(t);
            slots[pos].slot    = lanes[t][l].slot;
            slots[pos].payload = lanes[t][l].payload;
            pos = pos + 1;
          end
        end
      end
    end
    n_issued = CNT_W'(pos);
  end

  // Every offered instruction must find a slot.
  always_comb
    assert (int'(offered) <= int'(ISSUE_RATE))
      else $error("issue_merge: %0d instructions offered for %0d slots", offered, ISSUE_RATE);

endmodule
