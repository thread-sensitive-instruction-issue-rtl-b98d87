// tb_iq_subqueue: self-checking test of one instruction sub-queue.
//
// A 16-entry sub-queue with four dispatch lanes and two issue lanes is driven
// with random dispatch bursts, random wakeups and random issue choices among
// the entries it reports ready. A reference model, kept here as an ordered
// list of allocated slots (oldest first), predicts the free count, the slots
// that dispatch takes, the head, the ready mask and RIC, and the instruction
// each issued slot returns. The run fills the queue to exercise dispatch
// back-pressure and issues out of order to exercise holes behind the head.
module tb_iq_subqueue;
  import smt_issue_pkg::*;
  localparam int M = 16;
  localparam int D = 4;
  localparam int L = 2;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [D-1:0] disp_valid, disp_rdy, disp_accept;
  payload_t     disp_payload [D];
  logic [3:0]   disp_slot [D];
  logic [4:0]   free, ric;
  logic [M-1:0] wake, req;
  logic [3:0]   head;
  logic [L-1:0] iss_valid;
  logic [3:0]   iss_slot [L];
  payload_t     iss_payload [L];

  iq_subqueue #(.SUBQ_SIZE(M), .DISPATCH_W(D), .LANES(L)) u_dut (
    .clk(clk), .rst_n(rst_n),
    .disp_valid(disp_valid), .disp_rdy(disp_rdy), .disp_payload(disp_payload),
    .disp_accept(disp_accept), .disp_slot(disp_slot), .free(free),
    .wake(wake), .req(req), .ric(ric), .head(head),
    .iss_valid(iss_valid), .iss_slot(iss_slot), .iss_payload(iss_payload));

  // Reference model.
  int       order [$];          // allocated slots, oldest first
  bit       m_valid [M];
  bit       m_ready [M];
  payload_t m_pay [M];

  int checks = 0, failures = 0;
  int n_full = 0, n_backpressure = 0, n_holes = 0, n_issued = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    int n_disp, exp_free, exp_ric, nxt, cand [$], pick;
    logic [M-1:0] exp_req;
    payload_t pay_ctr;
    rst_n = 1'b0;
    disp_valid = '0; disp_rdy = '0; wake = '0; iss_valid = '0;
    for (int j = 0; j < D; j++) disp_payload[j] = '0;
    for (int l = 0; l < L; l++) iss_slot[l] = '0;
    for (int i = 0; i < M; i++) begin m_valid[i] = 0; m_ready[i] = 0; m_pay[i] = '0; end
    pay_ctr = 32'h1000;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // Compare the state outputs with the model.
      exp_free = M - order.size();
      exp_ric  = 0;
      exp_req  = '0;
      for (int i = 0; i < M; i++)
        if (m_valid[i] && m_ready[i]) begin exp_req[i] = 1'b1; exp_ric++; end
      check("free", free, exp_free);
      check("ric", ric, exp_ric);
      check("req", req, exp_req);
      if (order.size() > 0) check("head", head, order[0]);
      if (exp_free == 0) n_full++;
      for (int i = 0; i < order.size(); i++) if (!m_valid[order[i]]) begin n_holes++; break; end

      // Stimulus. Phases: fill (little issue), drain, mixed.
      n_disp = ((cyc / 500) % 2 == 0) ? $urandom_range(0, D) : $urandom_range(0, 1);
      disp_valid = '0;
      for (int j = 0; j < D; j++) begin
        disp_valid[j]   = (j < n_disp);
        disp_rdy[j]     = 1'($urandom_range(0, 2) == 0);
        disp_payload[j] = pay_ctr + 32'(j);
      end
      wake = M'($urandom) & M'($urandom);
      cand.delete();
      for (int i = 0; i < M; i++) if (exp_req[i]) cand.push_back(i);
      cand.shuffle();
      iss_valid = '0;
      for (int l = 0; l < L; l++) begin
        if (l < cand.size() && $urandom_range(0, ((cyc / 500) % 2 == 0) ? 3 : 1) == 0) begin
          iss_valid[l] = 1'b1;
          iss_slot[l]  = 4'(cand[l]);
        end
      end
      #1;
      // Dispatch handshake and slots.
      for (int j = 0; j < D; j++) begin
        check($sformatf("accept[%0d]", j), disp_accept[j], (j < n_disp) && (j < exp_free));
        if (j < n_disp && j < exp_free) begin
          nxt = (order.size() == 0) ? head : (order[order.size()-1] + 1 + j) % M;
          if (order.size() == 0) nxt = (int'(head) + j) % M;
          check($sformatf("disp_slot[%0d]", j), disp_slot[j], nxt);
        end
        if (j < n_disp && j >= exp_free) n_backpressure++;
      end
      for (int l = 0; l < L; l++)
        if (iss_valid[l]) check($sformatf("iss_payload[%0d]", l), iss_payload[l], m_pay[iss_slot[l]]);

      // Advance the model as the clock edge will.
      for (int l = 0; l < L; l++) if (iss_valid[l]) begin m_valid[iss_slot[l]] = 0; n_issued++; end
      for (int i = 0; i < M; i++) if (wake[i] && m_valid[i]) m_ready[i] = 1;
      for (int j = 0; j < D; j++) if (disp_accept[j]) begin
        m_valid[disp_slot[j]] = 1;
        m_ready[disp_slot[j]] = disp_rdy[j];
        m_pay[disp_slot[j]]   = disp_payload[j];
        order.push_back(int'(disp_slot[j]));
      end
      pay_ctr += 32'(D);
      while (order.size() > 0 && !m_valid[order[0]]) void'(order.pop_front());
    end
    // The run must have filled the queue, refused dispatch and left holes.
    check("queue was full", n_full > 0, 1);
    check("dispatch back-pressure", n_backpressure > 0, 1);
    check("holes behind head", n_holes > 0, 1);
    check("instructions issued", n_issued > 100, 1);
    $display("tb_iq_subqueue: full=%0d backpressure=%0d holes=%0d issued=%0d",
             n_full, n_backpressure, n_holes, n_issued);
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
