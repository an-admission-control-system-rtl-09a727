// tb_tmac_rr_prio_arbiter: self-checking test of the priority/round-robin
// arbiter. Random eligibility, priorities and enable are driven every
// cycle; the winner is compared with a reference that keeps its own
// last-granted index per priority level. It also counts how often a
// higher level beat a lower one and how often the rotation moved on
// within one level, and fails if either never happened.
module tb_tmac_rr_prio_arbiter;
  localparam int unsigned N = 5, PW = 2, L = 4;
  logic clk = 0, rst_n = 1;
  logic en;
  logic [N-1:0] elig;
  logic [N-1:0][PW-1:0] prio;
  logic vld;
  logic [2:0] idx;
  int checks = 0, failures = 0, prio_wins = 0, rotations = 0;
  int ptr[L];

  tmac_rr_prio_arbiter #(.NUM_INIT(N), .PRIO_W(PW)) dut (
    .clk, .rst_n, .en_i(en), .elig_i(elig), .prio_i(prio),
    .sel_vld_o(vld), .sel_idx_o(idx));

  always #5 clk = ~clk;

  initial begin
    en = 0; elig = 0; prio = 0;
    #1 rst_n = 0;
    for (int l = 0; l < L; l++) ptr[l] = N - 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int top, exp_idx, lo;
      bit any;
      en   = ($urandom_range(0, 4) != 0);
      elig = N'($urandom);
      // mostly only two levels are in use, as in a QoS/best-effort split
      for (int i = 0; i < N; i++)
        prio[i] = (n < 2500) ? PW'($urandom_range(0, 1) * 3) : PW'($urandom);
      top = -1; lo = L; any = 0;
      for (int i = 0; i < N; i++) if (elig[i]) begin
        any = 1;
        if (int'(prio[i]) > top) top = prio[i];
        if (int'(prio[i]) < lo) lo = prio[i];
      end
      exp_idx = -1;
      if (any)
        for (int k = 1; k <= N && exp_idx < 0; k++) begin
          int j;
          j = (ptr[top] + k) % N;
          if (elig[j] && int'(prio[j]) == top) exp_idx = j;
        end
      #1;
      checks++;
      if (vld != (en && any)) begin
        failures++; $display("FAIL vld %0d exp %0d", vld, en && any);
      end else if (vld) begin
        checks++;
        if (int'(idx) != exp_idx) begin
          failures++; $display("FAIL idx %0d exp %0d", idx, exp_idx);
        end
      end
      @(posedge clk);
      if (en && any) begin
        if (lo < top) prio_wins++;
        if (exp_idx != ptr[top]) rotations++;
        ptr[top] = exp_idx;
      end
      #1;
    end
    checks++;
    if (prio_wins == 0 || rotations == 0) begin
      failures++; $display("FAIL coverage prio_wins=%0d rotations=%0d", prio_wins, rotations);
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
