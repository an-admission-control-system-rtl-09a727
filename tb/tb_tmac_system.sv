// tb_tmac_system: end-to-end test of the admission-controlled system at
// its default size (five initiators, three tokens), with a behavioural
// fabric and target (tb_fabric_target) behind the ingress ports.
//
// Five saturating initiator models issue uniform read bursts ("all to
// one"); initiator 0 is programmed as the QoS initiator (highest
// priority). Phases:
//   A  4-beat reads, QoS initiator with one token of three
//   B  16-beat reads, same set-up
//   C  4-beat reads, QoS initiator allowed two tokens
//   D  4-beat writes from every initiator, write data sent together
//      with the write command
// Checked: every read beat carries the data the target must return for
// that burst, the last flag sits on the last beat, every write gets its
// response, never more than three transactions in the fabric, the QoS
// initiator's share of completed transactions (about 1/3 with one token,
// above that with two) and that its mean latency is below the best-effort
// mean. Each mechanism (token stall, priority grant, round robin among
// best-effort initiators, back-to-back return and request, two
// outstanding commands, token return on a write response) is counted and
// must occur at least once.
module tb_tmac_system;
  import tmac_pkg::*;
  localparam int unsigned N = 5, T = 3;
  logic clk = 0, rst_n = 1;
  logic cfg_we;
  logic [2:0] cfg_idx;
  logic [1:0] cfg_prio, cfg_quota;
  logic      [N-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  axi_addr_t [N-1:0] s_ar, s_aw, m_ar, m_aw;
  axi_r_t    [N-1:0] s_r, m_r;
  logic      [N-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  axi_w_t    [N-1:0] s_w, m_w;
  axi_b_t    [N-1:0] s_b, m_b;
  logic      [N-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  logic      [N-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic      [N-1:0] grant;
  logic [N-1:0][1:0] held;
  logic [1:0]        free_tokens;
  logic [N-1:0][3:0] rd_out, wr_out;
  int checks = 0, failures = 0, cyc = 0;

  tmac_system dut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b,
    .grant_o(grant), .held_o(held), .free_tokens_o(free_tokens),
    .rd_out_o(rd_out), .wr_out_o(wr_out));

  tb_fabric_target #(.N(N), .FAB_LAT(4)) u_fab (
    .clk, .rst_n,
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic configure(int i, int p, int q);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 3'(i); cfg_prio = 2'(p); cfg_quota = 2'(q);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // ---------------- initiator models ----------------
  typedef struct { axi_addr_t cmd; int start; } txn_t;
  bit        rd_en = 0, wr_en = 0;
  int        burst_len = 4;
  int        seq[N];
  int        ar_start[N];
  txn_t      rd_q[N][$];
  int        beat[N];
  int        done[N];
  longint    lat_sum[N];
  int        w_left[N];
  int        b_wait[N];
  int        wr_done[N];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      // read address: one command pending at a time per initiator
      if (s_ar_valid[i] && s_ar_ready[i]) begin
        txn_t t;
        t.cmd = s_ar[i]; t.start = ar_start[i];
        rd_q[i].push_back(t);
        s_ar_valid[i] <= 1'b0;
      end else if (!s_ar_valid[i] && rd_en) begin
        s_ar_valid[i]  <= 1'b1;
        s_ar[i].id     <= 4'(i);
        s_ar[i].addr   <= 32'(i << 24) | 32'(seq[i] << 8);
        s_ar[i].len    <= 4'(burst_len - 1);
        ar_start[i]    = cyc;
        seq[i]++;
      end
      // read data
      if (s_r_valid[i] && s_r_ready[i]) begin
        if (rd_q[i].size() == 0) check(0, "read data without a command");
        else begin
          txn_t t;
          t = rd_q[i][0];
          check(s_r[i].data == 64'(t.cmd.addr) + 64'(beat[i]), "read data matches the burst");
          check(s_r[i].id == t.cmd.id, "read id");
          check(s_r[i].last == (beat[i] == int'(t.cmd.len)), "last flag on last beat");
          if (beat[i] == int'(t.cmd.len)) begin
            beat[i] = 0;
            done[i]++;
            lat_sum[i] += longint'(cyc - t.start);
            void'(rd_q[i].pop_front());
          end else beat[i]++;
        end
      end
      // writes: command and data issued together, then wait for B
      if (s_aw_valid[i] && s_aw_ready[i]) begin
        s_aw_valid[i] <= 1'b0;
        b_wait[i]++;
      end
      if (s_w_valid[i] && s_w_ready[i]) begin
        if (w_left[i] == 1) s_w_valid[i] <= 1'b0;
        else begin
          s_w[i].data <= s_w[i].data + 1;
          s_w[i].last <= (w_left[i] == 2);
        end
        w_left[i]--;
      end
      if (s_b_valid[i] && s_b_ready[i]) begin
        check(b_wait[i] > 0, "write response after the write command");
        check(s_b[i].id == 4'(i), "write response id");
        b_wait[i]--;
        wr_done[i]++;
      end
      if (wr_en && !s_aw_valid[i] && !s_w_valid[i] && b_wait[i] == 0 && w_left[i] == 0) begin
        s_aw_valid[i]  <= 1'b1;
        s_aw[i].id     <= 4'(i);
        s_aw[i].addr   <= 32'(i << 24) | 32'(seq[i] << 8);
        s_aw[i].len    <= 4'(3);
        s_w_valid[i]   <= 1'b1;
        s_w[i].data    <= 64'(i << 8);
        s_w[i].strb    <= '1;
        s_w[i].last    <= 1'b0;
        w_left[i]      = 4;
        seq[i]++;
      end
    end
  end

  // ---------------- invariants and mechanism counters ----------------
  int n_stall = 0, n_prio = 0, n_b2b = 0, n_two = 0, n_wr_ret = 0;
  int be_served[N];
  always @(negedge clk) if (rst_n) begin
    int s, h;
    s = 0; h = 0;
    for (int i = 0; i < N; i++) begin
      s += int'(rd_out[i]) + int'(wr_out[i]);
      h += int'(held[i]);
    end
    check(s <= T, "at most three transactions in the fabric");
    check(h + int'(free_tokens) == T, "tokens conserved");
    if (dut.req != 0 && free_tokens == 0) n_stall++;
    if (dut.asg[0] && (dut.req[N-1:1] != 0)) n_prio++;
    for (int i = 1; i < N; i++) if (dut.asg[i]) be_served[i]++;
    for (int i = 0; i < N; i++) begin
      if (dut.rtn[i] && dut.req[i]) n_b2b++;
      if (dut.rtn[i] && wr_out[i] == 0 && s_b_valid == 0 && wr_done[i] > 0) n_wr_ret++;
    end
    if (rd_out[0] == 2) n_two++;
  end

  task automatic reset_stats();
    for (int i = 0; i < N; i++) begin done[i] = 0; lat_sum[i] = 0; end
  endtask

  task automatic report(string name, output real share, output real lat_qos, output real lat_be);
    int tot, be;
    longint lbe;
    tot = 0; be = 0; lbe = 0;
    for (int i = 0; i < N; i++) tot += done[i];
    for (int i = 1; i < N; i++) begin be += done[i]; lbe += lat_sum[i]; end
    share   = real'(done[0]) / real'(tot);
    lat_qos = real'(lat_sum[0]) / real'(done[0]);
    lat_be  = real'(lbe) / real'(be);
    $display("%s: completed %0d %0d %0d %0d %0d, QoS share %0.3f, mean latency QoS %0.1f BE %0.1f cycles",
             name, done[0], done[1], done[2], done[3], done[4], share, lat_qos, lat_be);
  endtask

  task automatic drain();
    rd_en = 0; wr_en = 0;
    while (s_ar_valid != 0 || s_aw_valid != 0 || s_w_valid != 0 || free_tokens != 2'(T)
           || rd_out != 0 || wr_out != 0) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    real sh, lq, lb;
    cfg_we = 0; cfg_idx = 0; cfg_prio = 0; cfg_quota = 0;
    s_ar_valid = 0; s_aw_valid = 0; s_w_valid = 0; s_ar = '0; s_aw = '0; s_w = '0;
    s_r_ready = '1; s_b_ready = '1;
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; beat[i] = 0; w_left[i] = 0; b_wait[i] = 0; wr_done[i] = 0; be_served[i] = 0;
    end
    reset_stats();
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    configure(0, 3, 1);                 // initiator 0 carries the QoS traffic
    // ---- A: 4-beat reads ----
    burst_len = 4; rd_en = 1;
    repeat (4000) @(posedge clk);
    drain();
    report("4-beat reads, 1 token", sh, lq, lb);
    check(sh > 0.28 && sh < 0.40, "QoS share about 1/3 with one token");
    check(lq < lb, "QoS latency below best-effort latency (4-beat)");
    // ---- B: 16-beat reads ----
    reset_stats();
    burst_len = 16; rd_en = 1;
    repeat (6000) @(posedge clk);
    drain();
    report("16-beat reads, 1 token", sh, lq, lb);
    check(sh > 0.28 && sh < 0.40, "QoS share about 1/3 with one token (16-beat)");
    check(lq < lb, "QoS latency below best-effort latency (16-beat)");
    // ---- C: two outstanding commands ----
    configure(0, 3, 2);
    reset_stats();
    burst_len = 4; rd_en = 1;
    repeat (4000) @(posedge clk);
    drain();
    report("4-beat reads, 2 tokens", sh, lq, lb);
    check(sh > 0.45 && sh < 0.70, "QoS share above 1/3 with two tokens");
    // ---- D: writes ----
    configure(0, 3, 1);
    wr_en = 1;
    repeat (2000) @(posedge clk);
    drain();
    $display("writes completed %0d %0d %0d %0d %0d", wr_done[0], wr_done[1], wr_done[2], wr_done[3], wr_done[4]);
    for (int i = 0; i < N; i++) check(wr_done[i] > 0, "every initiator completed writes");
    // ---- mechanisms ----
    $display("mechanisms: stall %0d, priority %0d, back-to-back %0d, two-outstanding %0d, write returns %0d, BE served %0d %0d %0d %0d",
             n_stall, n_prio, n_b2b, n_two, n_wr_ret, be_served[1], be_served[2], be_served[3], be_served[4]);
    check(n_stall > 0, "token stall happened");
    check(n_prio > 0, "priority grant happened");
    check(n_b2b > 0, "back-to-back return and request happened");
    check(n_two > 0, "two outstanding commands happened");
    check(n_wr_ret > 0, "token returned on a write response");
    for (int i = 1; i < N; i++) check(be_served[i] > 0, "round robin served every best-effort initiator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
