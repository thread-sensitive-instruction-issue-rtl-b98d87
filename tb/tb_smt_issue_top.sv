// tb_smt_issue_top: end-to-end test of the issue stage at its default size.
//
// The default machine (eight threads, 16-entry sub-queues, issue rate 12,
// dispatch width 4) runs 4000 cycles of mixed heavy and light threads with
// periodic fill-and-drain phases. issue_env compares every output with its
// cycle-exact model and requires each mechanism (starvation rule, shifted
// grant, grant limit, dispatch back-pressure, out-of-order issue, head
// skipping, wakeup, idle thread) to occur. A watchdog ends a hung run.
module tb_smt_issue_top;
  import smt_issue_pkg::*;
  localparam int K = DEF_NUM_THREADS;
  localparam int M = DEF_SUBQ_SIZE;
  localparam int R = DEF_ISSUE_RATE;
  localparam int D = DEF_DISPATCH_WIDTH;
  localparam int L = g_max(M, K, R);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n;
  logic [D-1:0]          disp_valid [K], disp_rdy [K], disp_accept [K];
  payload_t              disp_payload [K][D];
  logic [$clog2(M)-1:0]  disp_slot [K][D];
  logic [$clog2(M+1)-1:0] free [K], ric [K];
  logic [M-1:0]          wake [K];
  issue_slot_t           issue [R];
  logic [$clog2(R+1)-1:0] n_issued;
  logic [$clog2(L+1)-1:0] g [K];
  int     checks, failures;
  bit     done;
  longint total_issued, thread_issued [K];

  smt_issue_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .disp_valid(disp_valid), .disp_rdy(disp_rdy), .disp_payload(disp_payload),
    .disp_accept(disp_accept), .disp_slot(disp_slot), .free(free),
    .wake(wake), .issue(issue), .n_issued(n_issued), .ric(ric), .g(g));

  issue_env #(.K(K), .M(M), .R(R), .D(D), .CYCLES(4000), .PROFILE_SEED(7)) u_env (
    .clk(clk), .rst_n(rst_n),
    .disp_valid(disp_valid), .disp_rdy(disp_rdy), .disp_payload(disp_payload),
    .disp_accept(disp_accept), .disp_slot(disp_slot), .free(free),
    .wake(wake), .issue(issue), .n_issued(n_issued), .ric(ric), .g(g),
    .checks(checks), .failures(failures), .done(done),
    .total_issued(total_issued), .thread_issued(thread_issued));

  initial begin
    wait (done);
    u_env.report("8 threads");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", u_env.checks, u_env.failures + 1);
    $finish;
  end
endmodule
