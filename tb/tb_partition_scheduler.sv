// tb_partition_scheduler: self-checking test of one partitioned scheduler.
//
// Four-thread configuration (16-entry sub-queue, issue rate 8, n = 64), so G
// ranges over 0..2 and the scheduler has two lanes. Random ready masks and
// head positions are applied each cycle with RIC set to the mask's popcount.
// The checker keeps the RIC of the previous cycle, derives the limit G from it
// by division and the starvation rule, and expects the lanes to carry the
// min(G, ready) oldest ready entries counted from head. This checks both the
// one-cycle delay between RIC and G and the OLDEST order.
module tb_partition_scheduler;
  localparam int M = 16;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [M-1:0] req;
  logic [3:0]   head;
  logic [4:0]   ric;
  logic [1:0]   lane_valid;
  logic [3:0]   lane_slot [2];
  logic [1:0]   g_q;
  int checks = 0, failures = 0;
  int n_g2 = 0, n_starve = 0, n_limited = 0;

  partition_scheduler #(.NUM_THREADS(4), .SUBQ_SIZE(M), .ISSUE_RATE(8)) u_dut (
    .clk(clk), .rst_n(rst_n), .req(req), .head(head), .ric(ric),
    .lane_valid(lane_valid), .lane_slot(lane_slot), .g_q(g_q));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    int prev_ric, exp_g, found, k;
    rst_n = 1'b0; req = '0; head = '0; ric = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_ric = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: req = M'($urandom) & M'($urandom) & M'($urandom);
        1: req = M'(1) << $urandom_range(0, M - 1);
        default: req = M'($urandom);
      endcase
      if (cyc % 13 == 0) req = '0;
      if (cyc % 17 == 0) req = '1;
      head = 4'($urandom);
      ric  = 5'($countones(req));
      #1;
      exp_g = (prev_ric * 8) / 64;
      if (exp_g == 0 && prev_ric > 0) begin exp_g = 1; n_starve++; end
      if (exp_g == 2) n_g2++;
      check("g_q", int'(g_q), exp_g);
      found = 0;
      for (int i = 0; i < M; i++) begin
        k = (int'(head) + i) % M;
        if (req[k] && found < exp_g) begin
          check($sformatf("lane %0d slot", found), int'(lane_slot[found]), k);
          check($sformatf("lane %0d valid", found), int'(lane_valid[found]), 1);
          found++;
        end
      end
      if ($countones(req) > exp_g) n_limited++;
      for (int l = found; l < 2; l++) check($sformatf("lane %0d idle", l), int'(lane_valid[l]), 0);
      prev_ric = int'(ric);
    end
    check("G of 2 seen", n_g2 > 0, 1);
    check("starvation rule seen", n_starve > 0, 1);
    check("limit reached", n_limited > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
