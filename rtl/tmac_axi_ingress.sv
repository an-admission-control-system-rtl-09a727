// tmac_axi_ingress: admission gate between one AXI initiator and the fabric.
//
// The token manager is applied at the ingress edge of the fabric: an
// address command (read AR or write AW) may only enter the fabric while
// the initiator owns a token for it. This gate turns the initiator's AXI
// traffic into the token manager's request/grant/return signals:
//   * a pending AR or AW without a token raises req_o;
//   * each token assigned (assign_i strobe) is reserved for the waiting
//     read command first, else for the waiting write command;
//   * a reserved channel lets its command through (valid and ready are
//     forwarded only while the token is reserved);
//   * the token goes back (rtn_o pulse) when the read burst ends (R beat
//     with last accepted) or the write response (B) is accepted.
// Write data (W) is not gated, so it may be sent while the write command
// waits for its token; read data and write responses pass straight back.
// If a read and a write complete in the same cycle, the returns are
// queued and issued one per cycle.
//
// Interface: s_* is the initiator side, m_* the fabric side, each AXI
// channel as valid/ready plus a tmac_pkg payload struct. Timing: the
// gate adds no register on any AXI path; req_o and m_ar_valid/m_aw_valid
// depend only on registers and the initiator's valid. rtn_o comes from a
// register, one cycle after the completing handshake. The document gives
// the gating principle and the request/grant/return interface; how the
// gate is wired to AXI is this design's own. Reset asynchronous, active
// low.
module tmac_axi_ingress
  import tmac_pkg::*;
#(
  parameter int unsigned OUT_W = 4   // width of the outstanding counters
) (
  input  logic      clk,
  input  logic      rst_n,
  // initiator side
  input  logic      s_ar_valid,
  output logic      s_ar_ready,
  input  axi_addr_t s_ar,
  output logic      s_r_valid,
  input  logic      s_r_ready,
  output axi_r_t    s_r,
  input  logic      s_aw_valid,
  output logic      s_aw_ready,
  input  axi_addr_t s_aw,
  input  logic      s_w_valid,
  output logic      s_w_ready,
  input  axi_w_t    s_w,
  output logic      s_b_valid,
  input  logic      s_b_ready,
  output axi_b_t    s_b,
  // fabric side
  output logic      m_ar_valid,
  input  logic      m_ar_ready,
  output axi_addr_t m_ar,
  input  logic      m_r_valid,
  output logic      m_r_ready,
  input  axi_r_t    m_r,
  output logic      m_aw_valid,
  input  logic      m_aw_ready,
  output axi_addr_t m_aw,
  output logic      m_w_valid,
  input  logic      m_w_ready,
  output axi_w_t    m_w,
  input  logic      m_b_valid,
  output logic      m_b_ready,
  input  axi_b_t    m_b,
  // token manager side
  output logic      req_o,
  input  logic      assign_i,
  output logic      rtn_o,
  // status
  output logic [OUT_W-1:0] rd_out_o,
  output logic [OUT_W-1:0] wr_out_o
);

  logic             ar_tok_q, aw_tok_q;
  logic [OUT_W-1:0] rd_out_q, wr_out_q;
  logic [1:0]       ret_pend_q;
  logic             need_ar, need_aw;
  logic             ar_fire, aw_fire, r_done, b_done;
  logic             give_ar, give_aw, spare;

  assign need_ar = s_ar_valid && !ar_tok_q;
  assign need_aw = s_aw_valid && !aw_tok_q;
  assign req_o   = need_ar || need_aw;

  // Command channels: forwarded only while a token is reserved.
  assign m_ar_valid = s_ar_valid && ar_tok_q;
  assign s_ar_ready = m_ar_ready && ar_tok_q;
  assign m_ar       = s_ar;
  assign m_aw_valid = s_aw_valid && aw_tok_q;
  assign s_aw_ready = m_aw_ready && aw_tok_q;
  assign m_aw       = s_aw;

  // Write data, read data and write response pass through.
  assign m_w_valid = s_w_valid;
  assign s_w_ready = m_w_ready;
  assign m_w       = s_w;
  assign s_r_valid = m_r_valid;
  assign m_r_ready = s_r_ready;
  assign s_r       = m_r;
  assign s_b_valid = m_b_valid;
  assign m_b_ready = s_b_ready;
  assign s_b       = m_b;

  assign ar_fire = m_ar_valid && m_ar_ready;
  assign aw_fire = m_aw_valid && m_aw_ready;
  assign r_done  = m_r_valid && s_r_ready && m_r.last;
  assign b_done  = m_b_valid && s_b_ready;

  // Where an assigned token goes. A token that finds no waiting command
  // (cannot happen with an AXI-compliant initiator, whose valid stays
  // high) is handed straight back.
  assign give_ar = assign_i && need_ar;
  assign give_aw = assign_i && !need_ar && need_aw;
  assign spare   = assign_i && !need_ar && !need_aw;

  assign rtn_o = (ret_pend_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_tok_q   <= 1'b0;
      aw_tok_q   <= 1'b0;
      rd_out_q   <= '0;
      wr_out_q   <= '0;
      ret_pend_q <= '0;
    end else begin
      if (give_ar)      ar_tok_q <= 1'b1;
      else if (ar_fire) ar_tok_q <= 1'b0;
      if (give_aw)      aw_tok_q <= 1'b1;
      else if (aw_fire) aw_tok_q <= 1'b0;
      rd_out_q   <= rd_out_q + OUT_W'(ar_fire) - OUT_W'(r_done);
      wr_out_q   <= wr_out_q + OUT_W'(aw_fire) - OUT_W'(b_done);
      ret_pend_q <= ret_pend_q + 2'(r_done) + 2'(b_done) + 2'(spare)
                    - 2'(rtn_o);
    end
  end

  assign rd_out_o = rd_out_q;
  assign wr_out_o = wr_out_q;

  // A completion needs a transaction in flight.
  a_r_inflight : assert property (@(posedge clk) disable iff (!rst_n)
    r_done |-> (rd_out_q != '0));
  a_b_inflight : assert property (@(posedge clk) disable iff (!rst_n)
    b_done |-> (wr_out_q != '0));
  // AXI: a forwarded command stays valid until accepted.
  a_ar_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (m_ar_valid && !m_ar_ready) |=> m_ar_valid);

endmodule
