// tb_tmac_prio_mem: self-checking test of the priority/quota memory.
// Checks the reset contents, then random writes (including indices past
// the last initiator, which must be ignored) against a shadow copy kept
// in the testbench, reading every entry after every cycle.
module tb_tmac_prio_mem;
  localparam int unsigned N = 5, PW = 2, QW = 2;
  logic clk = 0, rst_n = 1;
  logic cfg_we;
  logic [2:0] cfg_idx;
  logic [PW-1:0] cfg_prio;
  logic [QW-1:0] cfg_quota;
  logic [N-1:0][PW-1:0] prio;
  logic [N-1:0][QW-1:0] quota;
  int checks = 0, failures = 0;
  int unsigned sh_p[N], sh_q[N];

  tmac_prio_mem #(.NUM_INIT(N), .PRIO_W(PW), .QUOTA_W(QW)) dut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota,
    .prio_o(prio), .quota_o(quota));

  always #5 clk = ~clk;

  task automatic compare();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (prio[i] != PW'(sh_p[i]) || quota[i] != QW'(sh_q[i])) begin
        failures++;
        $display("FAIL entry %0d: prio %0d/%0d quota %0d/%0d", i, prio[i], sh_p[i], quota[i], sh_q[i]);
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_idx = 0; cfg_prio = 0; cfg_quota = 0;
    for (int i = 0; i < N; i++) begin sh_p[i] = 0; sh_q[i] = 1; end
    #1 rst_n = 0;
    #1 compare();                       // asynchronous reset values
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      cfg_we    = ($urandom_range(0, 2) != 0);
      cfg_idx   = 3'($urandom_range(0, 7));
      cfg_prio  = PW'($urandom);
      cfg_quota = QW'($urandom);
      @(posedge clk);
      if (cfg_we && cfg_idx < N) begin
        sh_p[cfg_idx] = cfg_prio; sh_q[cfg_idx] = cfg_quota;
      end
      #1 compare();
    end
    // asynchronous reset restores the defaults
    rst_n = 0;
    for (int i = 0; i < N; i++) begin sh_p[i] = 0; sh_q[i] = 1; end
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
