// tmac_token_state: per-initiator token bookkeeping and the grant register.
//
// For every initiator it keeps the number of tokens held. A held count
// goes up by one when the arbiter assigns that initiator a token and down
// by one when the initiator pulses return. The grant output is a
// register that is high while the initiator holds at least one token:
// it rises the cycle after the assignment and falls the cycle after the
// last token comes back, which is the request/grant/return sequence of
// the document's read timing diagram. assign_o is a one-cycle strobe in
// that same cycle, telling an initiator that may hold several tokens that
// one more has arrived.
//
// eligible_o marks the initiators the arbiter may choose this cycle: the
// request is high, the held count (less any return in this cycle) is
// below the quota, and the initiator was not assigned a token in the
// previous cycle. That last rule exists because a registered initiator
// can only drop its request one cycle after it sees the grant; a request
// still high then is not taken as a second request.
//
// Interface: req_i, rtn_i are levels sampled on the rising edge (rtn_i
// is a one-cycle pulse per returned token); sel_vld_i/sel_idx_i come from
// the arbiter in the same cycle. Reset asynchronous, active low: no
// tokens held. The document gives the three signals and their order; the
// held counters, the quota check and the one-cycle mask are this
// design's own.
module tmac_token_state #(
  parameter int unsigned NUM_INIT = 5,
  parameter int unsigned QUOTA_W  = 2,
  localparam int unsigned IDX_W   = (NUM_INIT > 1) ? $clog2(NUM_INIT) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NUM_INIT-1:0]              req_i,
  input  logic [NUM_INIT-1:0]              rtn_i,
  input  logic [NUM_INIT-1:0][QUOTA_W-1:0] quota_i,
  input  logic                             sel_vld_i,
  input  logic [IDX_W-1:0]                 sel_idx_i,
  output logic [NUM_INIT-1:0]              eligible_o,
  output logic [NUM_INIT-1:0]              grant_o,
  output logic [NUM_INIT-1:0]              assign_o,
  output logic [NUM_INIT-1:0][QUOTA_W-1:0] held_o
);

  logic [NUM_INIT-1:0][QUOTA_W-1:0] held_q, held_d, held_net;
  logic [NUM_INIT-1:0]              grant_q, assign_q, take;

  always_comb begin
    for (int i = 0; i < NUM_INIT; i++) begin
      // A return from an initiator holding nothing is ignored.
      held_net[i]   = held_q[i] - QUOTA_W'(rtn_i[i] && (held_q[i] != '0));
      eligible_o[i] = req_i[i] && !assign_q[i] && (held_net[i] < quota_i[i]);
      take[i]       = sel_vld_i && (32'(sel_idx_i) == i);
      held_d[i]     = held_net[i] + QUOTA_W'(take[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q   <= '0;
      grant_q  <= '0;
      assign_q <= '0;
    end else begin
      held_q <= held_d;
      for (int i = 0; i < NUM_INIT; i++) begin
        grant_q[i]  <= (held_d[i] != '0);
        assign_q[i] <= take[i];
      end
    end
  end

  assign grant_o  = grant_q;
  assign assign_o = assign_q;
  assign held_o   = held_q;

  // The arbiter may only choose an eligible initiator.
  a_sel_eligible : assert property (@(posedge clk) disable iff (!rst_n)
    sel_vld_i |-> eligible_o[sel_idx_i]);
  // Returns only come from initiators that hold a token.
  a_rtn_held : assert property (@(posedge clk) disable iff (!rst_n)
    (rtn_i & ~grant_q) == '0);

endmodule
