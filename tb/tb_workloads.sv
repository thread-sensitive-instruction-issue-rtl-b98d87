// tb_workloads: thread-mix runs on the two evaluated machine configurations.
//
// Four thread mixes run side by side, each on its own issue stage:
//   * two 4-thread mixes on the 4-context machine (4 x 16 entries, issue
//     rate 8, so n = 64 and G ranges over 0..2);
//   * two 8-thread mixes on the default 8-context machine (8 x 16 entries,
//     issue rate 12, n = 128, G over 0..1).
// The threads are synthetic instruction streams with per-thread dispatch and
// readiness rates standing in for programs of different character; they are
// not traces of real programs. Every output is checked cycle by cycle by
// issue_env, each mechanism must occur, no cycle may issue more than the
// issue rate, and the measured instructions per cycle are printed.
module tb_workloads;
  import smt_issue_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks_sum, failures_sum;
  bit done [4];
  int chk [4], fail [4];

  for (genvar w = 0; w < 4; w++) begin : g_mix
    localparam int K = (w < 2) ? 4 : 8;
    localparam int M = 16;
    localparam int R = (w < 2) ? 8 : 12;
    localparam int D = 4;
    localparam int L = g_max(M, K, R);

    logic                   rst_n;
    logic [D-1:0]           disp_valid [K], disp_rdy [K], disp_accept [K];
    payload_t               disp_payload [K][D];
    logic [$clog2(M)-1:0]   disp_slot [K][D];
    logic [$clog2(M+1)-1:0] free [K], ric [K];
    logic [M-1:0]           wake [K];
    issue_slot_t            issue [R];
    logic [$clog2(R+1)-1:0] n_issued;
    logic [$clog2(L+1)-1:0] g [K];
    longint                 total_issued, thread_issued [K];

    smt_issue_top #(.NUM_THREADS(K), .SUBQ_SIZE(M), .ISSUE_RATE(R), .DISPATCH_W(D)) u_dut (
      .clk(clk), .rst_n(rst_n),
      .disp_valid(disp_valid), .disp_rdy(disp_rdy), .disp_payload(disp_payload),
      .disp_accept(disp_accept), .disp_slot(disp_slot), .free(free),
      .wake(wake), .issue(issue), .n_issued(n_issued), .ric(ric), .g(g));

    issue_env #(.K(K), .M(M), .R(R), .D(D), .CYCLES(6000), .PROFILE_SEED(100 + w)) u_env (
      .clk(clk), .rst_n(rst_n),
      .disp_valid(disp_valid), .disp_rdy(disp_rdy), .disp_payload(disp_payload),
      .disp_accept(disp_accept), .disp_slot(disp_slot), .free(free),
      .wake(wake), .issue(issue), .n_issued(n_issued), .ric(ric), .g(g),
      .checks(chk[w]), .failures(fail[w]), .done(done[w]),
      .total_issued(total_issued), .thread_issued(thread_issued));

    // Issue never exceeds the issue rate.
    always @(posedge clk) if (rst_n) assert (int'(n_issued) <= R);
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    g_mix[0].u_env.report("4-thread mix A");
    g_mix[1].u_env.report("4-thread mix B");
    g_mix[2].u_env.report("8-thread mix A");
    g_mix[3].u_env.report("8-thread mix B");
    checks_sum = 0; failures_sum = 0;
    for (int w = 0; w < 4; w++) begin
      checks_sum += chk[w];
      failures_sum += fail[w];
    end
    // The 8-context machine must sustain more issue than the 4-context one.
    checks_sum++;
    if (g_mix[2].total_issued + g_mix[3].total_issued <=
        g_mix[0].total_issued + g_mix[1].total_issued) begin
      failures_sum++;
      $display("FAIL 8-thread mixes issued no more than 4-thread mixes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks_sum, failures_sum);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule
