// tmac_system: token-managed admission control for NUM_INIT AXI
// initiators sharing a best-effort GALS fabric.
//
// The fabric itself only guarantees that nothing is lost; it does not
// stop initiators from flooding it. This block sits at the fabric's
// ingress: every initiator's AXI port passes through a tmac_axi_ingress
// gate, and a single tmac token manager hands out NUM_TOKENS tokens, so
// at most NUM_TOKENS transactions are in the fabric at once. The
// initiator programmed with the highest priority gets the next free token
// first; its share of the target bandwidth is then set by the number of
// tokens (1/3 with one token of three, about 2/3 if it may hold two).
//
// Interface: s_* arrays face the initiators, m_* arrays face the fabric
// (one AXI port per initiator, as the fabric's ingress ports); cfg_*
// programs priority and quota per initiator; grant_o, held_o and
// free_tokens_o expose the token state,
// rd_out_o/wr_out_o the transactions each initiator has in the fabric. All in one clock domain (the
// token manager and the initiators run at the same frequency); the
// fabric and the target are outside. Reset asynchronous, active low.
module tmac_system
  import tmac_pkg::*;
#(
  parameter int unsigned NUM_INIT    = 5,
  parameter int unsigned NUM_TOKENS  = 3,
  parameter int unsigned PRIO_W      = 2,
  parameter int unsigned QUOTA_W     = 2,
  parameter int unsigned OUT_W       = 4,
  localparam int unsigned IDX_W      = (NUM_INIT > 1) ? $clog2(NUM_INIT) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_TOKENS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic                             cfg_we,
  input  logic [IDX_W-1:0]                 cfg_idx,
  input  logic [PRIO_W-1:0]                cfg_prio,
  input  logic [QUOTA_W-1:0]               cfg_quota,
  // initiator side
  input  logic      [NUM_INIT-1:0]         s_ar_valid,
  output logic      [NUM_INIT-1:0]         s_ar_ready,
  input  axi_addr_t [NUM_INIT-1:0]         s_ar,
  output logic      [NUM_INIT-1:0]         s_r_valid,
  input  logic      [NUM_INIT-1:0]         s_r_ready,
  output axi_r_t    [NUM_INIT-1:0]         s_r,
  input  logic      [NUM_INIT-1:0]         s_aw_valid,
  output logic      [NUM_INIT-1:0]         s_aw_ready,
  input  axi_addr_t [NUM_INIT-1:0]         s_aw,
  input  logic      [NUM_INIT-1:0]         s_w_valid,
  output logic      [NUM_INIT-1:0]         s_w_ready,
  input  axi_w_t    [NUM_INIT-1:0]         s_w,
  output logic      [NUM_INIT-1:0]         s_b_valid,
  input  logic      [NUM_INIT-1:0]         s_b_ready,
  output axi_b_t    [NUM_INIT-1:0]         s_b,
  // fabric side
  output logic      [NUM_INIT-1:0]         m_ar_valid,
  input  logic      [NUM_INIT-1:0]         m_ar_ready,
  output axi_addr_t [NUM_INIT-1:0]         m_ar,
  input  logic      [NUM_INIT-1:0]         m_r_valid,
  output logic      [NUM_INIT-1:0]         m_r_ready,
  input  axi_r_t    [NUM_INIT-1:0]         m_r,
  output logic      [NUM_INIT-1:0]         m_aw_valid,
  input  logic      [NUM_INIT-1:0]         m_aw_ready,
  output axi_addr_t [NUM_INIT-1:0]         m_aw,
  output logic      [NUM_INIT-1:0]         m_w_valid,
  input  logic      [NUM_INIT-1:0]         m_w_ready,
  output axi_w_t    [NUM_INIT-1:0]         m_w,
  input  logic      [NUM_INIT-1:0]         m_b_valid,
  output logic      [NUM_INIT-1:0]         m_b_ready,
  input  axi_b_t    [NUM_INIT-1:0]         m_b,
  // token status
  output logic      [NUM_INIT-1:0]         grant_o,
  output logic [NUM_INIT-1:0][QUOTA_W-1:0] held_o,
  output logic [CNT_W-1:0]                 free_tokens_o,
  output logic [NUM_INIT-1:0][OUT_W-1:0]   rd_out_o,
  output logic [NUM_INIT-1:0][OUT_W-1:0]   wr_out_o
);

  logic [NUM_INIT-1:0] req, rtn, asg;

  for (genvar i = 0; i < NUM_INIT; i++) begin : g_ing
    tmac_axi_ingress #(.OUT_W(OUT_W)) u_ing (
      .clk, .rst_n,
      .s_ar_valid(s_ar_valid[i]), .s_ar_ready(s_ar_ready[i]), .s_ar(s_ar[i]),
      .s_r_valid(s_r_valid[i]),   .s_r_ready(s_r_ready[i]),   .s_r(s_r[i]),
      .s_aw_valid(s_aw_valid[i]), .s_aw_ready(s_aw_ready[i]), .s_aw(s_aw[i]),
      .s_w_valid(s_w_valid[i]),   .s_w_ready(s_w_ready[i]),   .s_w(s_w[i]),
      .s_b_valid(s_b_valid[i]),   .s_b_ready(s_b_ready[i]),   .s_b(s_b[i]),
      .m_ar_valid(m_ar_valid[i]), .m_ar_ready(m_ar_ready[i]), .m_ar(m_ar[i]),
      .m_r_valid(m_r_valid[i]),   .m_r_ready(m_r_ready[i]),   .m_r(m_r[i]),
      .m_aw_valid(m_aw_valid[i]), .m_aw_ready(m_aw_ready[i]), .m_aw(m_aw[i]),
      .m_w_valid(m_w_valid[i]),   .m_w_ready(m_w_ready[i]),   .m_w(m_w[i]),
      .m_b_valid(m_b_valid[i]),   .m_b_ready(m_b_ready[i]),   .m_b(m_b[i]),
      .req_o(req[i]), .assign_i(asg[i]), .rtn_o(rtn[i]),
      .rd_out_o(rd_out_o[i]), .wr_out_o(wr_out_o[i])
    );
  end

  tmac #(
    .NUM_INIT(NUM_INIT), .NUM_TOKENS(NUM_TOKENS),
    .PRIO_W(PRIO_W), .QUOTA_W(QUOTA_W)
  ) u_tmac (
    .clk, .rst_n,
    .req_i(req), .rtn_i(rtn), .grant_o, .assign_o(asg),
    .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota,
    .held_o, .free_tokens_o
  );

endmodule
