// tb_tmac: self-checking test of the token manager with five initiator
// models and three tokens.
//
// Phase 1 (directed, like the read timing example): initiators 2 and 4
// have high priority, all five request in the same cycle. Expected: one
// token per cycle, to 2, 4 and then 0 (round robin among the low ones),
// each grant one cycle after its selection, and 1 and 3 wait until a
// token comes back. Initiator 2 then returns its token and requests
// again in the same cycle and must win it straight back.
// Phase 2 (random): initiator models request, hold the token for a
// random burst time and return it, sometimes requesting again in the
// return cycle. Checked each cycle: free + held = NUM_TOKENS, grant
// levels match held counts, no initiator over its quota, and no
// request waits while a token is free and nobody else is served.
// Phase 3: initiator 0 is made high priority under saturation and must
// receive about one third of the tokens; then with a quota of two it
// must receive clearly more than one third, at most two thirds (a
// token freed in the cycle after an assignment can go to another
// initiator, so the ideal 2/3 is not quite reached).
module tb_tmac;
  localparam int unsigned N = 5, T = 3;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] req, rtn, grant, asg;
  logic cfg_we;
  logic [2:0] cfg_idx;
  logic [1:0] cfg_prio, cfg_quota;
  logic [N-1:0][1:0] held;
  logic [1:0] free_tokens;
  int checks = 0, failures = 0;
  int cyc = 0;

  tmac dut (.clk, .rst_n, .req_i(req), .rtn_i(rtn), .grant_o(grant), .assign_o(asg),
            .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota, .held_o(held),
            .free_tokens_o(free_tokens));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic set_prio(int i, int p, int q);
    cfg_we = 1; cfg_idx = 3'(i); cfg_prio = 2'(p); cfg_quota = 2'(q);
    @(posedge clk); #1 cfg_we = 0;
  endtask

  // invariants, sampled every cycle in the middle of the cycle
  always @(negedge clk) if (rst_n) begin
    int s;
    s = 0;
    for (int i = 0; i < N; i++) begin
      s += held[i];
      check(grant[i] == (held[i] != 0), "grant level follows held tokens");
    end
    check(s + int'(free_tokens) == T, "tokens are conserved");
  end

  // ---------------- random-phase initiator models ----------------
  bit   run_models = 0;
  int   expiry[N][$];    // when each held token is given back
  int   want[N];          // tokens wanted (up to quota)
  int   grants[N];
  int   b2b = 0, stalls = 0;
  int   quota_m[N];

  always @(posedge clk) if (run_models) begin
    for (int i = 0; i < N; i++) begin
      bit nrtn;
      rtn[i] <= 1'b0;
      if (asg[i]) begin
        grants[i]++;
        expiry[i].push_back(cyc + $urandom_range(4, 12));  // burst in the fabric
      end
      nrtn = 0;
      if (expiry[i].size() != 0 && expiry[i][0] <= cyc && !rtn[i]) begin
        nrtn = 1;
        void'(expiry[i].pop_front());
      end
      rtn[i] <= nrtn;
      // keep requesting while below quota (saturating initiators), also in
      // the cycle of a return; drop the request when a token arrives
      req[i] <= (int'(held[i]) - int'(rtn[i]) - int'(nrtn) < quota_m[i])
                && !asg[i] && (want[i] != 0);
      if (rtn[i] && req[i]) b2b++;
    end
    if (req != 0 && free_tokens == 0) stalls++;
  end

  initial begin
    req = 0; rtn = 0; cfg_we = 0; cfg_idx = 0; cfg_prio = 0; cfg_quota = 0;
    for (int i = 0; i < N; i++) begin want[i] = 1; grants[i] = 0; quota_m[i] = 1; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    set_prio(2, 1, 1);
    set_prio(4, 1, 1);
    // ---- phase 1 ----
    req = '1;
    @(posedge clk); #1;
    check(asg == 5'b00100 && grant == 5'b00100, "first token to high-priority init2, one cycle after request");
    req[2] = 0;
    @(posedge clk); #1;
    check(asg == 5'b10000 && grant == 5'b10100, "second token to init4");
    req[4] = 0;
    @(posedge clk); #1;
    check(asg == 5'b00001 && grant == 5'b10101, "third token to init0 (round robin among low)");
    req[0] = 0;
    check(free_tokens == 0, "pool empty");
    repeat (3) begin
      @(posedge clk); #1;
      check(asg == 0 && grant == 5'b10101, "init1 and init3 wait for a token");
    end
    // init2 returns and requests in the same cycle
    rtn[2] = 1; req[2] = 1;
    @(posedge clk); #1;
    rtn[2] = 0;
    check(asg == 5'b00100 && grant == 5'b10101, "back-to-back return and request: init2 wins again");
    req[2] = 0;
    // init0 returns: low-priority round robin moves on to init1
    rtn[0] = 1;
    @(posedge clk); #1;
    rtn[0] = 0;
    check(asg == 5'b00010 && grant == 5'b10110, "round robin: init1 after init0");
    req[1] = 0;
    rtn[4] = 1;
    @(posedge clk); #1;
    rtn[4] = 0;
    check(asg == 5'b01000 && grant == 5'b01110, "init3 served last");
    req = 0;
    rtn = grant;
    @(posedge clk); #1;
    rtn = 0;
    @(posedge clk); #1;
    check(free_tokens == T && grant == 0, "all tokens back");
    // ---- phase 2: random, everyone equal ----
    set_prio(2, 0, 1);
    set_prio(4, 0, 1);
    for (int i = 0; i < N; i++) grants[i] = 0;
    run_models = 1;
    repeat (3000) @(posedge clk);
    begin
      int tot, mn, mx;
      tot = 0; mn = 1 << 30; mx = 0;
      for (int i = 0; i < N; i++) begin
        tot += grants[i];
        if (grants[i] < mn) mn = grants[i];
        if (grants[i] > mx) mx = grants[i];
      end
      $display("equal priority: grants %0d %0d %0d %0d %0d", grants[0], grants[1], grants[2], grants[3], grants[4]);
      check(tot > 500, "tokens keep flowing");
      check(mx - mn <= tot / 10, "round robin shares tokens evenly");
    end
    // ---- phase 3: init0 high priority, quota 1 then 2 ----
    set_prio(0, 3, 1);
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (3000) @(posedge clk);
    begin
      int tot;
      real share;
      tot = 0;
      for (int i = 0; i < N; i++) tot += grants[i];
      share = real'(grants[0]) / real'(tot);
      $display("QoS initiator share with 1 of 3 tokens: %0.3f", share);
      check(share > 0.28 && share < 0.40, "QoS share about 1/3");
    end
    set_prio(0, 3, 2);
    quota_m[0] = 2;
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (3000) @(posedge clk);
    begin
      int tot;
      real share;
      tot = 0;
      for (int i = 0; i < N; i++) tot += grants[i];
      share = real'(grants[0]) / real'(tot);
      $display("QoS initiator share with 2 of 3 tokens: %0.3f", share);
      check(share > 0.50 && share < 0.75, "QoS share well above 1/3, at most 2/3");
    end
    check(b2b > 0, "back-to-back return/request seen");
    check(stalls > 0, "requests stalled on an empty pool");
    $display("back-to-back %0d, stalled cycles %0d", b2b, stalls);
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
