// tb_issue_merge: self-checking test of the issue-slot merge.
//
// Four threads with three lanes each feed eight issue slots. Random lane
// patterns with at most eight valid lanes are applied; the expected slot
// contents are built here by listing the valid lanes in thread-then-lane
// order, and the slot count must match.
module tb_issue_merge;
  import smt_issue_pkg::*;
  localparam int K = 4;
  localparam int L = 3;
  localparam int R = 8;

  lane_t       lanes [K][L];
  issue_slot_t slots [R];
  logic [3:0]  n_issued;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  issue_merge #(.NUM_THREADS(K), .LANES(L), .ISSUE_RATE(R)) u_dut (
    .lanes(lanes), .slots(slots), .n_issued(n_issued));

  initial begin
    issue_slot_t exp [$];
    issue_slot_t e;
    int n;
    for (int it = 0; it < 2000; it++) begin
      n = 0;
      exp.delete();
      for (int t = 0; t < K; t++)
        for (int l = 0; l < L; l++) begin
          lanes[t][l].valid   = 1'b0;
          lanes[t][l].slot    = SLOT_FIELD_W'($urandom);
          lanes[t][l].payload = $urandom;
          if (n < R && $urandom_range(0, 2) != 0) begin
            lanes[t][l].valid = 1'b1;
            n++;
            e.valid = 1'b1; e.tid = TID_FIELD_W'(t);
            e.slot = lanes[t][l].slot; e.payload = lanes[t][l].payload;
            exp.push_back(e);
          end
        end
      #1;
      checks++;
      if (int'(n_issued) != n) begin
        failures++;
        $display("FAIL n_issued %0d expected %0d", n_issued, n);
      end
      for (int s = 0; s < R; s++) begin
        checks++;
        if (s < n) begin
          if (slots[s] !== exp[s]) begin
            failures++;
            $display("FAIL slot %0d: got %p expected %p", s, slots[s], exp[s]);
          end
        end else if (slots[s].valid) begin
          failures++;
          $display("FAIL slot %0d valid, expected empty", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
