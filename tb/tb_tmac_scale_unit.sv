// tb_tmac_scale_unit: one token manager of a given size under saturating
// load, used by tb_tmac_scale. Initiator 0 is given the highest priority
// and one token at a time; every initiator keeps requesting, holds each
// token for a random 4..12 cycles and requests again in the cycle of its
// return. After a warm-up the unit counts tokens per initiator and checks
// token conservation every cycle, that initiator 0 gets about 1/T of all
// tokens, and that the best-effort initiators are served evenly. It
// raises done when finished and reports its counts on its ports.
module tb_tmac_scale_unit #(
  parameter int unsigned N      = 10,
  parameter int unsigned T      = 3,
  parameter int unsigned CYCLES = 6000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned IW = $clog2(N);
  logic rst_n = 1;
  logic [N-1:0] req, rtn, grant, asg;
  logic cfg_we;
  logic [IW-1:0] cfg_idx;
  logic [1:0] cfg_prio, cfg_quota;
  logic [N-1:0][1:0] held;
  logic [$clog2(T+1)-1:0] free_tokens;
  bit run = 0;
  int cyc = 0;
  int grants[N];
  int expiry[N][$];

  tmac #(.NUM_INIT(N), .NUM_TOKENS(T)) dut (
    .clk, .rst_n, .req_i(req), .rtn_i(rtn), .grant_o(grant), .assign_o(asg),
    .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota, .held_o(held), .free_tokens_o(free_tokens));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d T=%0d @%0d: %s", N, T, cyc, what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run) begin
      for (int i = 0; i < N; i++) begin
        bit nrtn;
        if (asg[i]) begin
          grants[i]++;
          expiry[i].push_back(cyc + $urandom_range(4, 12));
        end
        nrtn = 0;
        if (expiry[i].size() != 0 && expiry[i][0] <= cyc && !rtn[i]) begin
          nrtn = 1;
          void'(expiry[i].pop_front());
        end
        rtn[i] <= nrtn;
        req[i] <= (int'(held[i]) - int'(rtn[i]) - int'(nrtn) < 1) && !asg[i];
      end
    end
  end

  always @(negedge clk) if (run) begin
    int h;
    h = 0;
    for (int i = 0; i < N; i++) h += int'(held[i]);
    check(h + int'(free_tokens) == T, "tokens conserved");
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    req = 0; rtn = 0; cfg_we = 0; cfg_idx = 0; cfg_prio = 0; cfg_quota = 0;
    for (int i = 0; i < N; i++) grants[i] = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cfg_we = 1; cfg_idx = '0; cfg_prio = 2'd3; cfg_quota = 2'd1;
    @(posedge clk); #1 cfg_we = 0;
    run = 1;
    repeat (500) @(posedge clk);
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (CYCLES) @(posedge clk);
    begin
      int tot, mn, mx;
      real share;
      tot = 0; mn = 1 << 30; mx = 0;
      for (int i = 0; i < N; i++) tot += grants[i];
      for (int i = 1; i < N; i++) begin
        if (grants[i] < mn) mn = grants[i];
        if (grants[i] > mx) mx = grants[i];
      end
      share = real'(grants[0]) / real'(tot);
      $display("N=%0d T=%0d: %0d tokens assigned, QoS share %0.3f (1/T = %0.3f), best-effort min %0d max %0d",
               N, T, tot, share, 1.0 / T, mn, mx);
      check(share > 0.85 / T && share < 1.15 / T, "QoS share about 1/T");
      check(mx - mn <= (mx / 5) + 2, "best-effort initiators served evenly");
    end
    done = 1;
  end
endmodule
