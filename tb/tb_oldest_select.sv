// tb_oldest_select: self-checking test of the OLDEST(G) selector.
//
// A 16-entry selector with three lanes gets random request masks, head
// positions and limits. The expected grant is worked out from ages: entry i
// has age (i - head) mod 16 and is granted when it requests and fewer than
// min(g, lanes) requesting entries are older. Lane k must carry the k-th
// oldest granted entry. A watchdog ends a hung run.
module tb_oldest_select;
  localparam int M = 16;
  localparam int L = 3;

  logic [M-1:0] req;
  logic [3:0]   head;
  logic [1:0]   g;
  logic [L-1:0] lane_valid;
  logic [3:0]   lane_slot [L];
  logic [M-1:0] grant;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  oldest_select #(.SUBQ_SIZE(M), .LANES(L)) u_dut (
    .req(req), .head(head), .g(g),
    .lane_valid(lane_valid), .lane_slot(lane_slot), .grant(grant));

  initial begin
    logic [M-1:0] exp_grant;
    int           older, limit, exp_slot [L], n_exp;
    for (int it = 0; it < 3000; it++) begin
      req  = M'($urandom);
      if (it % 7 == 0) req = '0;
      if (it % 11 == 0) req = '1;
      head = 4'($urandom);
      g    = 2'($urandom);
      #1;
      limit = (int'(g) < L) ? int'(g) : L;
      exp_grant = '0;
      n_exp = 0;
      for (int k = 0; k < L; k++) exp_slot[k] = -1;
      for (int i = 0; i < M; i++) begin
        if (!req[i]) continue;
        older = 0;
        for (int j = 0; j < M; j++)
          if (req[j] && ((j - int'(head) + M) % M) < ((i - int'(head) + M) % M)) older++;
        if (older < limit) begin
          exp_grant[i] = 1'b1;
          exp_slot[older] = i;
          n_exp++;
        end
      end
      checks++;
      if (grant !== exp_grant) begin
        failures++;
        $display("FAIL grant req=%h head=%0d g=%0d got %h exp %h", req, head, g, grant, exp_grant);
      end
      for (int k = 0; k < L; k++) begin
        checks++;
        if (lane_valid[k] !== (k < n_exp) ||
            (k < n_exp && int'(lane_slot[k]) != exp_slot[k])) begin
          failures++;
          $display("FAIL lane %0d req=%h head=%0d g=%0d: valid %b slot %0d exp slot %0d",
                   k, req, head, g, lane_valid[k], lane_slot[k], exp_slot[k]);
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
