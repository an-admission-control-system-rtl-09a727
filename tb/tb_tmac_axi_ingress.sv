// tb_tmac_axi_ingress: directed self-checking test of one ingress gate.
// Checks that a read command is held back and a token requested while
// no token is owned, that an assigned token lets exactly one command
// through, that the token is returned one cycle after the last read
// beat and after the write response, that write data passes while the
// write command waits, that a token goes to the waiting read before the
// waiting write, and that a read and a write finishing in the same
// cycle give two return pulses on consecutive cycles.
module tb_tmac_axi_ingress;
  import tmac_pkg::*;
  logic clk = 0, rst_n = 1;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready, s_aw_valid, s_aw_ready;
  logic s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready, m_aw_valid, m_aw_ready;
  logic m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  axi_addr_t s_ar, s_aw, m_ar, m_aw;
  axi_r_t s_r, m_r;
  axi_w_t s_w, m_w;
  axi_b_t s_b, m_b;
  logic req, asg, rtn;
  logic [3:0] rd_out, wr_out;
  int checks = 0, failures = 0;

  tmac_axi_ingress dut (.clk, .rst_n,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b,
    .req_o(req), .assign_i(asg), .rtn_o(rtn), .rd_out_o(rd_out), .wr_out_o(wr_out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // advance one clock, then look at the outputs in the middle of the cycle
  task automatic step();
    @(posedge clk); #2;
  endtask

  initial begin
    s_ar_valid = 0; s_aw_valid = 0; s_w_valid = 0; s_r_ready = 1; s_b_ready = 1;
    m_ar_ready = 1; m_aw_ready = 1; m_w_ready = 1; m_r_valid = 0; m_b_valid = 0;
    s_ar = '0; s_aw = '0; s_w = '0; m_r = '0; m_b = '0; asg = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    step();
    check(!req && !rtn && rd_out == 0, "idle after reset");
    // 1. read command without a token
    s_ar_valid = 1; s_ar.addr = 32'h1234_5600; s_ar.len = 3; s_ar.id = 4'h2;
    #1;
    check(req && !m_ar_valid && !s_ar_ready, "read held back, token requested");
    repeat (3) begin step(); check(req && !m_ar_valid, "still waiting for a token"); end
    // 2. token assigned (one-cycle strobe)
    asg = 1; step(); asg = 0;
    #1;
    check(m_ar_valid && s_ar_ready && m_ar.addr == 32'h1234_5600 && !req, "token lets the read through");
    step(); s_ar_valid = 0;
    #1;
    check(rd_out == 1 && !m_ar_valid, "one read in flight, token used");
    // 3. read data, four beats
    for (int k = 0; k < 4; k++) begin
      m_r_valid = 1; m_r.data = 64'(k); m_r.last = (k == 3);
      #1 check(s_r_valid && s_r.data == 64'(k), "read data passes back");
      step();
      check(rtn == (k == 3), "token returned one cycle after the last beat only");
    end
    m_r_valid = 0;
    step();
    check(!rtn && rd_out == 0, "return is a single pulse");
    // 4. write: data passes while the command waits
    s_aw_valid = 1; s_aw.addr = 32'hA000; s_aw.id = 4'h2;
    s_w_valid = 1; s_w.data = 64'h55; s_w.last = 0;
    #1;
    check(req && !m_aw_valid && m_w_valid && s_w_ready && m_w.data == 64'h55, "write data not gated, command gated");
    step(); s_w.last = 1; step(); s_w_valid = 0;
    asg = 1; step(); asg = 0;
    #1 check(m_aw_valid && s_aw_ready, "token lets the write command through");
    step(); s_aw_valid = 0;
    check(wr_out == 1, "one write in flight");
    m_b_valid = 1; m_b.id = 4'h2;
    #1 check(s_b_valid && s_b.id == 4'h2, "write response passes back");
    step(); m_b_valid = 0;
    check(rtn, "token returned after the write response");
    step();
    check(!rtn && wr_out == 0, "write complete");
    // 5. read and write both waiting: the token goes to the read first
    s_ar_valid = 1; s_aw_valid = 1;
    #1 check(req, "both waiting");
    asg = 1; step(); asg = 0;
    #1 check(m_ar_valid && !m_aw_valid, "first token to the read");
    m_ar_ready = 0;
    step();
    check(req && m_ar_valid, "request stays up for the write; read held while not ready");
    asg = 1; m_ar_ready = 1; step(); asg = 0; s_ar_valid = 0;
    #1 check(m_aw_valid, "second token to the write");
    step(); s_aw_valid = 0;
    #1 check(rd_out == 1 && wr_out == 1 && !req, "one read and one write in flight");
    // 6. both finish in the same cycle: two returns, one per cycle
    m_r_valid = 1; m_r.last = 1; m_b_valid = 1;
    step();
    m_r_valid = 0; m_b_valid = 0;
    check(rtn, "first return");
    step();
    check(rtn, "second return on the next cycle");
    step();
    check(!rtn && rd_out == 0 && wr_out == 0, "all returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
