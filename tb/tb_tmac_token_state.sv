// tb_tmac_token_state: self-checking test of the per-initiator token
// bookkeeping. Random requests, returns (only from initiators holding a
// token), quotas and selections (always one of the eligible initiators,
// as the arbiter would choose) are driven; held counts, eligibility, the
// grant level and the assign strobe are compared with a reference.
// Covered and required at least once: a quota-2 initiator holding two
// tokens, the one-cycle request mask after an assignment, and a return
// and new assignment to the same initiator in one cycle.
module tb_tmac_token_state;
  localparam int unsigned N = 5, QW = 2;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req, rtn, elig, grant, asg;
  logic [N-1:0][QW-1:0] quota, held;
  logic sel_vld;
  logic [2:0] sel_idx;
  int checks = 0, failures = 0, two_held = 0, masked = 0, b2b = 0;
  int m_held[N];
  bit m_asg[N];

  tmac_token_state #(.NUM_INIT(N), .QUOTA_W(QW)) dut (
    .clk, .rst_n, .req_i(req), .rtn_i(rtn), .quota_i(quota),
    .sel_vld_i(sel_vld), .sel_idx_i(sel_idx),
    .eligible_o(elig), .grant_o(grant), .assign_o(asg), .held_o(held));

  always #5 clk = ~clk;

  initial begin
    int e[N];
    int ne, pick;
    req = 0; rtn = 0; sel_vld = 0; sel_idx = 0;
    for (int i = 0; i < N; i++) begin quota[i] = 1; m_held[i] = 0; m_asg[i] = 0; end
    quota[0] = 2;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      if (n % 1000 == 999) quota[$urandom_range(1, N-1)] = QW'($urandom_range(0, 3));
      req = N'($urandom);
      for (int i = 0; i < N; i++) rtn[i] = (m_held[i] > 0) && ($urandom_range(0, 3) == 0);
      ne = 0;
      for (int i = 0; i < N; i++) begin
        int net;
        net = m_held[i] - int'(rtn[i]);
        e[i] = int'(req[i] && !m_asg[i] && net < int'(quota[i]));
        if (req[i] && m_asg[i] && net < int'(quota[i])) masked++;
        ne += e[i];
      end
      sel_vld = (ne > 0) && ($urandom_range(0, 2) != 0);
      pick = $urandom_range(0, ne > 0 ? ne - 1 : 0);
      sel_idx = 0;
      for (int i = 0, c = 0; i < N; i++) if (e[i] == 1) begin
        if (c == pick) sel_idx = 3'(i);
        c++;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (elig[i] != e[i][0]) begin failures++; $display("FAIL elig[%0d] %0d exp %0d", i, elig[i], e[i]); end
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        bit t;
        t = sel_vld && (int'(sel_idx) == i);
        if (t && rtn[i]) b2b++;
        m_held[i] = m_held[i] - int'(rtn[i]) + int'(t);
        m_asg[i] = t;
        if (m_held[i] == 2) two_held++;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 3;
        if (int'(held[i]) != m_held[i]) begin failures++; $display("FAIL held[%0d] %0d exp %0d", i, held[i], m_held[i]); end
        if (grant[i] != (m_held[i] > 0)) begin failures++; $display("FAIL grant[%0d]", i); end
        if (asg[i] != m_asg[i]) begin failures++; $display("FAIL assign[%0d]", i); end
      end
    end
    checks++;
    if (two_held == 0 || masked == 0 || b2b == 0) begin
      failures++; $display("FAIL coverage two_held=%0d masked=%0d b2b=%0d", two_held, masked, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
