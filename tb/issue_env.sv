// issue_env: stimulus and cycle-exact reference model for smt_issue_top.
//
// Drives the dispatch, wakeup and reset inputs of the issue stage and checks
// every output each cycle against a model kept here in plain behavioural
// code: per thread, the allocated slots in age order, their ready flags and
// instructions, and the grant limit G registered from the previous cycle's
// ready count. Each cycle the expected issue is the min(G, ready) oldest ready
// instructions of every thread, packed into the issue slots in thread order.
//
// Threads follow a per-thread profile (dispatch rate, share of instructions
// ready at dispatch, wakeup rate) chosen by PROFILE_SEED, so the run mixes
// threads with much and little ready work. The counters at the bottom record
// how often each mechanism of the design occurred; the instantiating test
// demands each at least once.
module issue_env
  import smt_issue_pkg::*;
#(
  parameter int unsigned K      = DEF_NUM_THREADS,
  parameter int unsigned M      = DEF_SUBQ_SIZE,
  parameter int unsigned R      = DEF_ISSUE_RATE,
  parameter int unsigned D      = DEF_DISPATCH_WIDTH,
  parameter int unsigned CYCLES = 2000,
  parameter int unsigned PROFILE_SEED = 1,
  localparam int unsigned LANES = g_max(M, K, R),
  localparam int unsigned SW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CW    = $clog2(M + 1),
  localparam int unsigned GW    = $clog2(LANES + 1),
  localparam int unsigned IW    = $clog2(R + 1)
) (
  input  logic          clk,
  output logic          rst_n,
  output logic [D-1:0]  disp_valid   [K],
  output logic [D-1:0]  disp_rdy     [K],
  output payload_t      disp_payload [K][D],
  input  logic [D-1:0]  disp_accept  [K],
  input  logic [SW-1:0] disp_slot    [K][D],
  input  logic [CW-1:0] free         [K],
  output logic [M-1:0]  wake         [K],
  input  issue_slot_t   issue        [R],
  input  logic [IW-1:0] n_issued,
  input  logic [CW-1:0] ric          [K],
  input  logic [GW-1:0] g            [K],
  output int            checks,
  output int            failures,
  output bit            done,
  output longint        total_issued,
  output longint        thread_issued [K]
);

  // Mechanism counters.
  int n_starve_rule;     // G raised from 0 to 1
  int n_shift_grant;     // G >= 1 straight from the shifted product
  int n_limited;         // a thread had more ready instructions than G
  int n_backpressure;    // a dispatch lane refused: sub-queue full
  int n_out_of_order;    // an instruction issued while an older one waited
  int n_holes_skipped;   // head moved past more than one freed slot at once
  int n_wakeups;         // an entry became ready through wake
  int n_idle_thread;     // a thread with no ready work while others issued
  int max_issued;        // most instructions issued in one cycle
  int cycles_run;

  // Model state.
  int       order [K][$];
  bit       m_valid [K][M];
  bit       m_ready [K][M];
  payload_t m_pay   [K][M];
  int       m_g     [K];

  // Per-thread profile, in percent.
  int p_disp [K];
  int p_rdy  [K];
  int p_wake [K];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic int g_of(int ric_v);
    int gv;
    gv = (ric_v * int'(R)) / int'(K * M);
    if (gv == 0 && ric_v > 0) gv = 1;
    return gv;
  endfunction

  initial begin
    int          seq, n_rdy, n_exp, sum_g, ready_cnt, skipped, first_valid;
    int          nd;
    issue_slot_t exp_slot [$];
    issue_slot_t e;
    bit          any_issue;
    void'($urandom(PROFILE_SEED));
    checks = 0; failures = 0; done = 1'b0; total_issued = 0;
    n_starve_rule = 0; n_shift_grant = 0; n_limited = 0; n_backpressure = 0;
    n_out_of_order = 0; n_holes_skipped = 0; n_wakeups = 0; n_idle_thread = 0;
    max_issued = 0; cycles_run = 0;
    for (int t = 0; t < K; t++) begin
      thread_issued[t] = 0;
      m_g[t] = 0;
      for (int i = 0; i < M; i++) begin m_valid[t][i] = 0; m_ready[t][i] = 0; m_pay[t][i] = '0; end
      // Alternate heavy and light threads, with some spread.
      p_disp[t] = (t % 2 == 0) ? $urandom_range(60, 100) : $urandom_range(10, 40);
      p_rdy[t]  = (t % 3 == 0) ? $urandom_range(50, 90)  : $urandom_range(0, 30);
      p_wake[t] = $urandom_range(5, 40);
    end
    rst_n = 1'b0;
    for (int t = 0; t < K; t++) begin
      disp_valid[t] = '0; disp_rdy[t] = '0; wake[t] = '0;
      for (int j = 0; j < D; j++) disp_payload[t][j] = '0;
    end
    seq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int cyc = 0; cyc < int'(CYCLES); cyc++) begin
      @(negedge clk);
      cycles_run++;
      // State outputs.
      sum_g = 0;
      for (int t = 0; t < K; t++) begin
        n_rdy = 0;
        for (int i = 0; i < M; i++) if (m_valid[t][i] && m_ready[t][i]) n_rdy++;
        check($sformatf("free[%0d]", t), free[t], M - order[t].size());
        check($sformatf("ric[%0d]", t), ric[t], n_rdy);
        check($sformatf("g[%0d]", t), g[t], m_g[t]);
        sum_g += m_g[t];
      end
      check("sum of G within issue rate", sum_g <= int'(R), 1);

      // Stimulus. Every 400 cycles one burst phase stops all wakeups so the
      // queues fill, then a phase where everything wakes drains them.
      for (int t = 0; t < K; t++) begin
        nd = 0;
        for (int j = 0; j < D; j++) if ($urandom_range(1, 100) <= p_disp[t]) nd++;
        if ((cyc % 400) >= 300 && (cyc % 400) < 340) nd = D;
        disp_valid[t] = '0;
        for (int j = 0; j < D; j++) begin
          disp_valid[t][j]   = (j < nd);
          disp_rdy[t][j]     = ($urandom_range(1, 100) <= p_rdy[t]);
          disp_payload[t][j] = {8'(t), 24'(seq)};
          seq++;
        end
        for (int i = 0; i < M; i++) begin
          if ((cyc % 400) >= 300 && (cyc % 400) < 340) wake[t][i] = 1'b0;
          else if ((cyc % 400) >= 340)                 wake[t][i] = 1'b1;
          else wake[t][i] = ($urandom_range(1, 100) <= p_wake[t]);
        end
      end
      #1;

      // Expected issue: per thread the oldest ready entries, up to G.
      exp_slot.delete();
      any_issue = 0;
      for (int t = 0; t < K; t++) begin
        n_exp = 0;
        ready_cnt = 0;
        first_valid = -1;
        for (int q = 0; q < order[t].size(); q++) begin
          int s;
          s = order[t][q];
          if (m_valid[t][s] && first_valid < 0) first_valid = s;
          if (m_valid[t][s] && m_ready[t][s]) begin
            ready_cnt++;
            if (n_exp < m_g[t]) begin
              e.valid = 1'b1; e.tid = TID_FIELD_W'(t); e.slot = SLOT_FIELD_W'(s);
              e.payload = m_pay[t][s];
              exp_slot.push_back(e);
              n_exp++;
              if (s != first_valid) n_out_of_order++;
            end
          end
        end
        if (ready_cnt > m_g[t]) n_limited++;
        if (n_exp > 0) any_issue = 1;
        thread_issued[t] += n_exp;
      end
      for (int t = 0; t < K; t++) begin
        ready_cnt = 0;
        for (int i = 0; i < M; i++) if (m_valid[t][i] && m_ready[t][i]) ready_cnt++;
        if (ready_cnt == 0 && any_issue) n_idle_thread++;
      end
      check("n_issued", n_issued, exp_slot.size());
      for (int s = 0; s < int'(R); s++) begin
        if (s < exp_slot.size()) begin
          check($sformatf("issue[%0d].tid", s), issue[s].tid, exp_slot[s].tid);
          check($sformatf("issue[%0d].slot", s), issue[s].slot, exp_slot[s].slot);
          check($sformatf("issue[%0d].payload", s), issue[s].payload, exp_slot[s].payload);
        end
        check($sformatf("issue[%0d].valid", s), issue[s].valid, s < exp_slot.size());
      end
      total_issued += exp_slot.size();
      if (exp_slot.size() > max_issued) max_issued = exp_slot.size();

      // Dispatch handshake.
      for (int t = 0; t < K; t++) begin
        int fr, last;
        fr = M - order[t].size();
        last = (order[t].size() > 0) ? order[t][order[t].size()-1] : -1;
        for (int j = 0; j < D; j++) begin
          check($sformatf("accept[%0d][%0d]", t, j), disp_accept[t][j],
                disp_valid[t][j] && (j < fr));
          if (disp_valid[t][j] && j >= fr) n_backpressure++;
          if (disp_valid[t][j] && j < fr && last >= 0)
            check($sformatf("disp_slot[%0d][%0d]", t, j), disp_slot[t][j], (last + 1 + j) % M);
        end
      end

      // Advance the model over the clock edge.
      for (int t = 0; t < K; t++) begin
        n_rdy = 0;
        for (int i = 0; i < M; i++) if (m_valid[t][i] && m_ready[t][i]) n_rdy++;
        if (n_rdy > 0 && (n_rdy * int'(R)) / int'(K * M) == 0) n_starve_rule++;
        if ((n_rdy * int'(R)) / int'(K * M) > 0) n_shift_grant++;
        m_g[t] = g_of(n_rdy);
      end
      foreach (exp_slot[k]) m_valid[exp_slot[k].tid][exp_slot[k].slot] = 0;
      for (int t = 0; t < K; t++) begin
        for (int i = 0; i < M; i++)
          if (wake[t][i] && m_valid[t][i] && !m_ready[t][i]) begin
            m_ready[t][i] = 1; n_wakeups++;
          end
        for (int j = 0; j < D; j++) if (disp_accept[t][j]) begin
          m_valid[t][disp_slot[t][j]] = 1;
          m_ready[t][disp_slot[t][j]] = disp_rdy[t][j];
          m_pay[t][disp_slot[t][j]]   = disp_payload[t][j];
          order[t].push_back(int'(disp_slot[t][j]));
        end
        skipped = 0;
        while (order[t].size() > 0 && !m_valid[t][order[t][0]]) begin
          void'(order[t].pop_front());
          skipped++;
        end
        if (skipped > 1) n_holes_skipped++;
      end
    end
    @(negedge clk);
    done = 1'b1;
  end

  // Report, and demand that every mechanism occurred.
  task automatic report(string name);
    $display("%s: %0d cycles, %0d instructions issued, %.2f per cycle, at most %0d in one cycle",
             name, cycles_run, total_issued, real'(total_issued) / real'(cycles_run), max_issued);
    for (int t = 0; t < K; t++)
      $display("%s:   thread %0d issued %0d (%.2f per cycle)", name, t, thread_issued[t],
               real'(thread_issued[t]) / real'(cycles_run));
    $display("%s: starvation rule %0d, shifted grant %0d, limit reached %0d, back-pressure %0d,",
             name, n_starve_rule, n_shift_grant, n_limited, n_backpressure);
    $display("%s: out-of-order issue %0d, multi-slot head skip %0d, wakeups %0d, idle thread %0d",
             name, n_out_of_order, n_holes_skipped, n_wakeups, n_idle_thread);
    check("mechanism: starvation rule", n_starve_rule > 0, 1);
    check("mechanism: shifted grant", n_shift_grant > 0, 1);
    check("mechanism: grant limit reached", n_limited > 0, 1);
    check("mechanism: dispatch back-pressure", n_backpressure > 0, 1);
    check("mechanism: out-of-order issue", n_out_of_order > 0, 1);
    check("mechanism: head skips freed slots", n_holes_skipped > 0, 1);
    check("mechanism: wakeup", n_wakeups > 0, 1);
    check("mechanism: idle thread", n_idle_thread > 0, 1);
  endtask

endmodule
