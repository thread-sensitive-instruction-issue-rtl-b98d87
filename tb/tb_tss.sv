// tb_tss: self-checking test of the thread-sensitive scheduler.
//
// Two instances: the default eight-thread machine (n = 128, issue rate 12) and
// the four-thread machine (n = 64, issue rate 8). Every RIC value from 0 to a
// full sub-queue is applied; the expected G is worked out here by integer
// division (not by a shift) and the starvation rule, and must appear on g_q
// one clock after RIC was applied. A watchdog ends a hung run.
module tb_tss;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Default configuration.
  logic [4:0] ric8;
  logic [0:0] g8;
  tss u_dut8 (.clk(clk), .rst_n(rst_n), .ric(ric8), .g_q(g8));

  // Four threads, issue rate 8.
  logic [4:0] ric4;
  logic [1:0] g4;
  tss #(.NUM_THREADS(4), .SUBQ_SIZE(16), .ISSUE_RATE(8))
    u_dut4 (.clk(clk), .rst_n(rst_n), .ric(ric4), .g_q(g4));

  function automatic int expect_g(int ric, int rate, int n);
    int g;
    g = (ric * rate) / n;
    if (g == 0 && ric > 0) g = 1;
    return g;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    ric8  = '0;
    ric4  = '0;
    repeat (2) @(posedge clk);
    check("reset g8", int'(g8), 0);
    check("reset g4", int'(g4), 0);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r <= 16; r++) begin
      @(negedge clk);
      ric8 = 5'(r);
      ric4 = 5'(16 - r);
      // Not yet visible: g_q still holds the previous value.
      check($sformatf("g8 before edge r=%0d", r), int'(g8),
            (r == 0) ? 0 : expect_g(r - 1, 12, 128));
      @(posedge clk); #1;
      check($sformatf("g8 r=%0d", r), int'(g8), expect_g(r, 12, 128));
      check($sformatf("g4 r=%0d", 16 - r), int'(g4), expect_g(16 - r, 8, 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
