// tb_tmac_token_counter: self-checking test of the free-token pool.
// Random assignments and returns are driven within the rules (never more
// tokens out than exist, a take only when one is available); the count
// and the same-cycle availability are compared with a counter kept in
// the testbench. It also checks that a return and a take in one cycle
// (back to back) leave the pool unchanged, and that the pool can drain
// to zero.
module tb_tmac_token_counter;
  localparam int unsigned N = 5, T = 3;
  logic clk = 0, rst_n = 0;
  logic [2:0] ret_cnt;
  logic take;
  logic [1:0] free_o;
  logic [3:0] avail_o;
  int checks = 0, failures = 0, model = T, outst = 0, empties = 0, b2b = 0;

  tmac_token_counter #(.NUM_INIT(N), .NUM_TOKENS(T)) dut (
    .clk, .rst_n, .ret_cnt, .take, .free_o, .avail_o);

  always #5 clk = ~clk;

  initial begin
    ret_cnt = 0; take = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int r, a;
      r = (outst > 0) ? $urandom_range(0, outst) : 0;
      if ($urandom_range(0, 3) != 0 && r > 1) r = 1;
      a = model + r;
      ret_cnt = 3'(r);
      take = (a > 0) && ($urandom_range(0, 3) != 0);
      #1;
      checks += 2;
      if (free_o != 2'(model)) begin failures++; $display("FAIL free %0d exp %0d", free_o, model); end
      if (avail_o != 4'(a)) begin failures++; $display("FAIL avail %0d exp %0d", avail_o, a); end
      if (r > 0 && take) b2b++;
      @(posedge clk);
      model = a - int'(take);
      outst = T - model;
      if (model == 0) empties++;
      #1;
    end
    checks++;
    if (empties == 0 || b2b == 0) begin failures++; $display("FAIL coverage empties=%0d b2b=%0d", empties, b2b); end
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
