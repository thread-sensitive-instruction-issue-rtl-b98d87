// tss: thread-sensitive scheduler of one partition.
//
// Each cycle it turns the thread's metric, the ready instruction count (RIC) of
// its sub-queue, into G, the most instructions the partition may issue in the
// next cycle:  G = RIC * ISSUE_RATE / n,  where n = NUM_THREADS * SUBQ_SIZE is
// the size of the whole instruction queue. Because RIC of all threads together
// can never exceed n, n stands in for the sum of the metrics, so no adder
// across the threads is needed, and because n is a power of two the division
// is a right shift by log2(n). The product with the constant ISSUE_RATE is a
// constant multiply (shifts and adds). When the thread has at least one ready
// instruction but the shifted value is zero, G is raised to 1 so that no
// thread with ready work starves. All of this follows the original proposal.
//
// Timing: G is registered (g_q); the value computed from RIC in cycle t is the
// limit the OLDEST selector uses in cycle t+1. Reset clears G to 0, a choice of
// this design.
//
// Interface: ric (RIC_W bits, 0..SUBQ_SIZE) in, g_q (G_W bits) out.
module tss
  import smt_issue_pkg::*;
#(
  parameter int unsigned NUM_THREADS = smt_issue_pkg::DEF_NUM_THREADS,
  parameter int unsigned SUBQ_SIZE   = smt_issue_pkg::DEF_SUBQ_SIZE,
  parameter int unsigned ISSUE_RATE  = smt_issue_pkg::DEF_ISSUE_RATE,
  localparam int unsigned IQ_SIZE    = NUM_THREADS * SUBQ_SIZE,
  localparam int unsigned SHIFT      = $clog2(IQ_SIZE),
  localparam int unsigned RIC_W      = $clog2(SUBQ_SIZE + 1),
  localparam int unsigned G_MAX      = g_max(SUBQ_SIZE, NUM_THREADS, ISSUE_RATE),
  localparam int unsigned G_W        = $clog2(G_MAX + 1),
  localparam int unsigned PROD_W     = RIC_W + $clog2(ISSUE_RATE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RIC_W-1:0] ric,
  output logic [G_W-1:0]   g_q
);

  // The shift replaces the division only when n is a power of two.
  if ((1 << SHIFT) != IQ_SIZE) begin : g_size_chk
    $error("tss: NUM_THREADS*SUBQ_SIZE must be a power of two");
  end

  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] shifted;
  logic [G_W-1:0]    g_d;

  always_comb begin
    prod    = PROD_W'(ric) * PROD_W'(ISSUE_RATE);
    shifted = prod >> SHIFT;
    if (ric != '0 && shifted == '0)
      g_d = G_W'(1);                  // starvation rule
    else
      g_d = G_W'(shifted);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) g_q <= '0;
    else        g_q <= g_d;
  end

endmodule
