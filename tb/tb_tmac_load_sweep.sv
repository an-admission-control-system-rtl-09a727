// tb_tmac_load_sweep: latency and bandwidth share against offered load.
//
// The admission-controlled system (default size: five initiators, three
// tokens, initiator 0 the QoS initiator) is driven through the
// behavioural fabric and target with uniform random 4-beat reads. Each
// idle initiator starts a new read with probability p per cycle; p is
// stepped from light load to saturation. For each step the testbench
// prints the target utilisation (beats delivered per cycle), the QoS
// initiator's share of completed reads and the mean end-to-end latency
// (command issued to last beat) of QoS and best-effort traffic.
// Checked: read data of every beat; utilisation grows with load below
// saturation and stays above 75% at saturation (where three tokens leave
// small gaps between bursts, so it can sit slightly below the heaviest
// unsaturated step); at light load the QoS initiator's share is
// its offered share (it gets what it asks for) and its latency is no
// worse than best effort; at the highest load its latency is well below
// the best-effort latency and its share is about 1/3.
module tb_tmac_load_sweep;
  import tmac_pkg::*;
  localparam int unsigned N = 5;
  localparam int NSTEP = 5;
  localparam int unsigned P_PERMILLE [NSTEP] = '{10, 30, 45, 100, 1000};
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

  typedef struct { axi_addr_t cmd; int start; } txn_t;
  bit        gen = 0;
  int        p_permille = 0;
  int        seq[N], beat[N], done[N], issued[N], ar_start[N];
  longint    lat_sum[N];
  longint    beats = 0;
  txn_t      rd_q[N][$];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (s_ar_valid[i] && s_ar_ready[i]) begin
        txn_t t;
        t.cmd = s_ar[i]; t.start = ar_start[i];
        rd_q[i].push_back(t);
        s_ar_valid[i] <= 1'b0;
      end else if (!s_ar_valid[i] && gen && ($urandom_range(0, 999) < p_permille)) begin
        s_ar_valid[i] <= 1'b1;
        s_ar[i].id    <= 4'(i);
        s_ar[i].addr  <= 32'(i << 24) | 32'(seq[i] << 8);
        s_ar[i].len   <= 4'd3;
        ar_start[i]   = cyc;
        issued[i]++;
        seq[i]++;
      end
      if (s_r_valid[i] && s_r_ready[i]) begin
        beats++;
        if (rd_q[i].size() == 0) check(0, "read data without a command");
        else begin
          txn_t t;
          t = rd_q[i][0];
          check(s_r[i].data == 64'(t.cmd.addr) + 64'(beat[i]), "read data matches the burst");
          if (beat[i] == int'(t.cmd.len)) begin
            beat[i] = 0;
            done[i]++;
            lat_sum[i] += longint'(cyc - t.start);
            void'(rd_q[i].pop_front());
          end else beat[i]++;
        end
      end
    end
  end

  initial begin
    real util[NSTEP], share, lq, lb, offered;
    int tot, be, iss_tot, start;
    longint lbe;
    cfg_we = 0; cfg_idx = 0; cfg_prio = 0; cfg_quota = 0;
    s_ar_valid = 0; s_aw_valid = 0; s_w_valid = 0; s_ar = '0; s_aw = '0; s_w = '0;
    s_r_ready = '1; s_b_ready = '1;
    for (int i = 0; i < N; i++) begin seq[i] = 0; beat[i] = 0; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    cfg_we = 1; cfg_idx = 0; cfg_prio = 2'd3; cfg_quota = 2'd1;
    @(negedge clk);
    cfg_we = 0;
    for (int s = 0; s < NSTEP; s++) begin
      for (int i = 0; i < N; i++) begin done[i] = 0; issued[i] = 0; lat_sum[i] = 0; end
      beats = 0;
      p_permille = P_PERMILLE[s];
      gen = 1;
      start = cyc;
      repeat (4000) @(posedge clk);
      gen = 0;
      while (s_ar_valid != 0 || rd_out != 0 || free_tokens != 2'd3) @(posedge clk);
      repeat (5) @(posedge clk);
      util[s] = real'(beats) / real'(cyc - start);
      tot = 0; be = 0; lbe = 0; iss_tot = 0;
      for (int i = 0; i < N; i++) begin tot += done[i]; iss_tot += issued[i]; end
      for (int i = 1; i < N; i++) begin be += done[i]; lbe += lat_sum[i]; end
      share = real'(done[0]) / real'(tot);
      offered = real'(issued[0]) / real'(iss_tot);
      lq = real'(lat_sum[0]) / real'(done[0]);
      lb = real'(lbe) / real'(be);
      $display("p=%0d/1000: utilisation %0.2f, QoS share %0.3f, latency QoS %0.1f BE %0.1f cycles",
               P_PERMILLE[s], util[s], share, lq, lb);
      check(tot == iss_tot, "every issued read completed");
      if (s > 0 && s < NSTEP - 1) check(util[s] >= util[s-1] - 0.02, "utilisation grows with load");
      if (s == 0) begin
        check(share > offered - 0.03 && share < offered + 0.03, "light load: QoS initiator gets what it asks for");
        check(lq <= lb * 1.1, "light load: QoS latency no worse than best effort");
      end
      if (s == NSTEP - 1) begin
        check(util[s] > 0.75, "saturation reached");
        check(lq < 0.75 * lb, "saturation: QoS latency well below best effort");
        check(share > 0.28 && share < 0.40, "saturation: QoS share about 1/3");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
