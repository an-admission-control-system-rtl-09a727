// tmac: the token manager of the token-managed admission control.
//
// A fixed number of tokens (NUM_TOKENS, 3 in the evaluated five-initiator
// system) limits how many transactions may be in the fabric at once.
// Each initiator has a request/grant/return interface. In every cycle in
// which a token is free, the arbiter picks one requesting initiator
// (highest programmed priority first, round robin among equals) and
// assigns it a token; grant rises in the next cycle and stays high until
// the initiator has returned all its tokens. Only one token is assigned
// per cycle. A token returned in a cycle may be assigned again in that
// same cycle, so an initiator can return a token and request a new one
// back to back.
//
// Inside: tmac_prio_mem (priority memory and quotas), tmac_token_state
// (held tokens, eligibility, grant register), tmac_token_counter (free
// token pool) and tmac_rr_prio_arbiter (priority/round-robin choice with
// its scan memory), wired as the document's schematic shows them.
//
// Interface, per initiator i: req_i[i] (level, hold until assign_o[i]),
// rtn_i[i] (one-cycle pulse per returned token), grant_o[i] (level),
// assign_o[i] (one-cycle strobe per token assigned). cfg_* programs
// priority and quota. free_tokens_o shows the pool.
// Timing: request in cycle t, grant and assign visible in cycle t+1.
// Reset: nreset style, asynchronous, active low.
module tmac #(
  parameter int unsigned NUM_INIT    = 5,
  parameter int unsigned NUM_TOKENS  = 3,
  parameter int unsigned PRIO_W      = 2,
  parameter int unsigned QUOTA_W     = 2,
  parameter int unsigned RESET_QUOTA = 1,
  localparam int unsigned IDX_W      = (NUM_INIT > 1) ? $clog2(NUM_INIT) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_TOKENS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NUM_INIT-1:0]              req_i,
  input  logic [NUM_INIT-1:0]              rtn_i,
  output logic [NUM_INIT-1:0]              grant_o,
  output logic [NUM_INIT-1:0]              assign_o,
  input  logic                             cfg_we,
  input  logic [IDX_W-1:0]                 cfg_idx,
  input  logic [PRIO_W-1:0]                cfg_prio,
  input  logic [QUOTA_W-1:0]               cfg_quota,
  output logic [NUM_INIT-1:0][QUOTA_W-1:0] held_o,
  output logic [CNT_W-1:0]                 free_tokens_o
);

  localparam int unsigned RET_W = $clog2(NUM_INIT + 1);
  localparam int unsigned SUM_W = ((CNT_W > RET_W) ? CNT_W : RET_W) + 1;

  logic [NUM_INIT-1:0][PRIO_W-1:0]  prio;
  logic [NUM_INIT-1:0][QUOTA_W-1:0] quota;
  logic [NUM_INIT-1:0]              elig;
  logic                             sel_vld;
  logic [IDX_W-1:0]                 sel_idx;
  logic [RET_W-1:0]                 ret_cnt;
  logic [SUM_W-1:0]                 avail;
  logic [NUM_INIT-1:0][QUOTA_W-1:0] held;

  tmac_prio_mem #(
    .NUM_INIT(NUM_INIT), .PRIO_W(PRIO_W), .QUOTA_W(QUOTA_W),
    .RESET_PRIO(0), .RESET_QUOTA(RESET_QUOTA)
  ) u_mem (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_prio, .cfg_quota,
    .prio_o(prio), .quota_o(quota)
  );

  tmac_token_state #(.NUM_INIT(NUM_INIT), .QUOTA_W(QUOTA_W)) u_state (
    .clk, .rst_n, .req_i, .rtn_i, .quota_i(quota),
    .sel_vld_i(sel_vld), .sel_idx_i(sel_idx),
    .eligible_o(elig), .grant_o, .assign_o, .held_o(held)
  );

  // Returns that count: those from initiators actually holding a token.
  always_comb begin
    ret_cnt = '0;
    for (int i = 0; i < NUM_INIT; i++)
      ret_cnt += RET_W'(rtn_i[i] && (held[i] != '0));
  end

  tmac_token_counter #(.NUM_INIT(NUM_INIT), .NUM_TOKENS(NUM_TOKENS)) u_cnt (
    .clk, .rst_n, .ret_cnt, .take(sel_vld),
    .free_o(free_tokens_o), .avail_o(avail)
  );

  tmac_rr_prio_arbiter #(.NUM_INIT(NUM_INIT), .PRIO_W(PRIO_W)) u_arb (
    .clk, .rst_n, .en_i(avail != '0), .elig_i(elig), .prio_i(prio),
    .sel_vld_o(sel_vld), .sel_idx_o(sel_idx)
  );

  assign held_o = held;

endmodule
